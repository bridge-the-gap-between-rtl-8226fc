// switch_control: selects the qubit modality the processor controls.
//
// The processing system writes the mode register (MODE_SC superconducting,
// MODE_NA neutral atoms, MODE_TI trapped ions). The shared classical and
// quantum control serve every mode; switch control enables the specialised
// hardware of the selected modality. A neutral-atom command from the quantum
// decoder (cmd 0 IIF image fetch, 1 IAD atom detection, 2 IAS atom sorting,
// 3 IAM atom moving) becomes a one-cycle start pulse to that unit only in
// MODE_NA; in any other mode it is refused and `blocked` pulses. na_busy
// merges the busy flags of the neutral-atom units for the decoder. The mode
// takes effect in the cycle after the write and resets to MODE_SC. The
// document names the block and its purpose (changing the modality); the
// gating scheme is this design's choice. The trapped-ion hardware is not
// built, so MODE_TI enables no special unit.
module switch_control
  import uqcp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode_we,
  input  mode_e      mode_wdata,
  output mode_e      mode,
  input  logic       cmd_valid,
  input  logic [1:0] cmd,
  output logic [3:0] na_start,   // {IAM, IAS, IAD, IIF}
  input  logic [3:0] na_unit_busy,
  output logic       na_busy,
  output logic       blocked
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       mode <= MODE_SC;
    else if (mode_we) mode <= mode_wdata;
  end

  always_comb begin
    na_start = '0;
    blocked  = 1'b0;
    if (cmd_valid) begin
      if (mode == MODE_NA) na_start[cmd] = 1'b1;
      else                 blocked = 1'b1;
    end
  end

  assign na_busy = |na_unit_busy;
endmodule
