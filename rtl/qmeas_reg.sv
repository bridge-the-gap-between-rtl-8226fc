// qmeas_reg: Q-measure register.
//
// Keeps, per qubit, the latest measurement result and whether a measurement
// has been issued whose result has not yet come back. The quantum decoder
// raises meas_issue for the qubits of each measurement it accepts, which sets
// their pending bits; the readout interface returns results with a
// per-qubit valid strobe, which stores the bit and clears pending. A read
// port gives one qubit's result and pending bit for FMR; FMR waits while
// pending is set, which is how feedforward on a mid-circuit measurement
// stalls the classical side. `results` is the whole vector, sampled by the
// histogram. One outstanding measurement per qubit is assumed; the document
// names the register and the FMR semantics but not its timing.
module qmeas_reg #(
  parameter int unsigned NQ = 96
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic [NQ-1:0]          meas_issue,
  input  logic [NQ-1:0]          ro_valid,
  input  logic [NQ-1:0]          ro_result,
  input  logic [$clog2(NQ)-1:0]  rd_qubit,
  output logic                   rd_result,
  output logic                   rd_pending,
  output logic [NQ-1:0]          results,
  output logic [NQ-1:0]          pending,
  output logic                   any_pending
);
  assign rd_result   = results[rd_qubit];
  assign rd_pending  = pending[rd_qubit];
  assign any_pending = |pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      results <= '0;
      pending <= '0;
    end else if (clear) begin
      results <= '0;
      pending <= '0;
    end else begin
      results <= (results & ~ro_valid) | (ro_result & ro_valid);
      pending <= (pending & ~ro_valid) | meas_issue;
    end
  end
endmodule
