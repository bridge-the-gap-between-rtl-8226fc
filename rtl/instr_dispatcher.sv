// instr_dispatcher: instruction fetch and dispatch.
//
// After `start` from the processing system it fetches the program from
// address 0, one 32-bit word per cycle. A long instruction (SMSOL, SITOL) is
// followed by three payload words, which are gathered into `ext` before the
// instruction is issued. Quantum instructions go to the quantum decoder with
// a valid/ready handshake, classical ones to the classical core, which
// reports completion (`c_done`) and branch outcome. The dispatcher then moves
// the PC by the instruction length or by the branch offset. A standard
// instruction therefore takes two cycles when nothing stalls, a long one
// five. On END it waits until the quantum path has drained and the
// histogram and neutral-atom units are idle, then raises `done` (held until
// the next start) and pulses `end_pulse`, the End signal to the processing
// system. rf_raddr selects the register whose value accompanies a quantum
// instruction: rt for FHR, rs otherwise. The block, the Start/End signals and
// the split between quantum and classical instructions follow the document;
// the state machine is this design's own.
module instr_dispatcher
  import uqcp_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          running,
  output logic                          done,
  output logic                          end_pulse,
  // instruction memory
  output logic [$clog2(IMEM_WORDS)-1:0] imem_raddr,
  input  logic [31:0]                   imem_rdata,
  // to the quantum decoder
  output logic                          q_valid,
  input  logic                          q_ready,
  output logic [31:0]                   q_instr,
  output logic [LONG_W-1:0]             q_ext,
  // to the classical core
  output logic                          c_valid,
  output logic [31:0]                   c_instr,
  input  logic                          c_done,
  input  logic                          c_br_taken,
  input  logic signed [31:0]            c_br_offset,
  output logic [4:0]                    rf_raddr,
  // drain condition for END
  input  logic                          drained,
  output logic [$clog2(IMEM_WORDS)-1:0] pc
);
  localparam int unsigned PA_W = $clog2(IMEM_WORDS);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_EXT, S_ISSUE, S_DRAIN} state_e;
  state_e      state;
  logic [31:0] ir;
  logic [1:0]  ext_cnt;
  logic        quantum, is_end;

  assign quantum = is_quantum(ir);
  assign is_end  = !is_bundle(ir) && ir[31:26] == OP_END;
  assign running = (state != S_IDLE);

  assign q_instr  = ir;
  assign c_instr  = ir;
  assign q_valid  = (state == S_ISSUE) && quantum;
  assign c_valid  = (state == S_ISSUE) && !quantum && !is_end;
  assign rf_raddr = (ir[31:26] == OP_FHR) ? ir[15:11] : ir[20:16];

  always_comb begin
    imem_raddr = pc;
    if (state == S_EXT) imem_raddr = pc + PA_W'(ext_cnt) + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pc        <= '0;
      ir        <= '0;
      q_ext     <= '0;
      ext_cnt   <= '0;
      done      <= 1'b0;
      end_pulse <= 1'b0;
    end else begin
      end_pulse <= 1'b0;
      if (start) begin
        state <= S_FETCH;
        pc    <= '0;
        done  <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_FETCH: begin
            ir      <= imem_rdata;
            ext_cnt <= '0;
            state   <= is_long(imem_rdata) ? S_EXT : S_ISSUE;
          end
          S_EXT: begin
            q_ext[32*ext_cnt +: 32] <= imem_rdata;
            ext_cnt <= ext_cnt + 1'b1;
            if (ext_cnt == 2'd2) state <= S_ISSUE;
          end
          S_ISSUE: begin
            if (is_end) begin
              state <= S_DRAIN;
            end else if (quantum) begin
              if (q_ready) begin
                pc    <= pc + (is_long(ir) ? PA_W'(4) : PA_W'(1));
                state <= S_FETCH;
              end
            end else if (c_done) begin
              pc    <= c_br_taken ? pc + PA_W'(c_br_offset) : pc + 1'b1;
              state <= S_FETCH;
            end
          end
          S_DRAIN: begin
            if (drained) begin
              state     <= S_IDLE;
              done      <= 1'b1;
              end_pulse <= 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
