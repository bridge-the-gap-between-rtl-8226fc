// classical_core: the classical control unit of the processor.
//
// Executes the classical instructions of the hybrid ISA: the ALU operations
// AND, OR, XOR, ADD, SUB on 32 registers of 32 bits; LDI; LD and ST to a
// local data memory; CMP, which sets eight comparison flags (always, never,
// eq, ne, lt, ge, ltu, geu); BR on a flag and J, both PC-relative; FBR,
// which copies a flag into a register; and FMR, which copies the latest
// measurement result of a qubit into a register. Each instruction executes
// in the cycle it is presented (valid) and is complete when `done` is high;
// register and memory writes happen at that clock edge. FMR holds `done` low
// while the qubit still has a measurement pending, which stalls the
// instruction stream until the readout arrives (the feedforward path).
// Branches report br_taken and a signed word offset to the dispatcher.
// A read port (rf_raddr/rf_rdata) lets the dispatcher pass register values to
// quantum instructions (QWAITR, FHR); dmem_raddr/dmem_rdata let the
// processing system read results. The block diagram shows a simple RISC-V
// core here; this unit implements the document's classical instruction list
// instead of the RISC-V base ISA, in this design's own encoding.
module classical_core
  import uqcp_pkg::*;
#(
  parameter int unsigned NQ         = 96,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          valid,
  input  logic [31:0]                   instr,
  output logic                          done,
  output logic                          br_taken,
  output logic signed [31:0]            br_offset,
  // measurement results
  output logic [$clog2(NQ)-1:0]         fmr_qubit,
  input  logic                          fmr_result,
  input  logic                          fmr_pending,
  output logic                          fmr_stall,
  // register read port for the quantum side
  input  logic [4:0]                    rf_raddr,
  output logic [XLEN-1:0]               rf_rdata,
  // data memory read port for the processing system
  input  logic [$clog2(DMEM_WORDS)-1:0] dmem_raddr,
  output logic [XLEN-1:0]               dmem_rdata
);
  localparam int unsigned DA_W = $clog2(DMEM_WORDS);

  logic [XLEN-1:0] rf [NREGS];
  logic [XLEN-1:0] dmem [DMEM_WORDS];
  logic [7:0]      flags;

  opcode_e         op;
  logic [4:0]      rd, rs, rt;
  logic [XLEN-1:0] a, b, res, addr;
  logic            rf_we, dm_we, fl_we;
  logic [7:0]      new_flags;
  logic [3:0]      flag_sel;

  assign op   = opcode_e'(instr[31:26]);
  assign rd   = instr[25:21];
  assign rs   = instr[20:16];
  assign rt   = instr[15:11];
  assign a    = rf[rs];
  assign b    = rf[rt];
  assign addr = a + {{16{instr[15]}}, instr[15:0]};
  assign fmr_qubit  = instr[$clog2(NQ)-1:0];
  assign rf_rdata   = rf[rf_raddr];
  assign dmem_rdata = dmem[dmem_raddr];

  always_comb begin
    // bit i is the flag with code i (FL_ALWAYS = 0 ... FL_GEU = 7)
    new_flags = {a >= b, a < b,
                 $signed(a) >= $signed(b), $signed(a) < $signed(b),
                 a != b, a == b, 1'b0, 1'b1};
  end

  always_comb begin
    done      = valid;
    br_taken  = 1'b0;
    br_offset = 32'sd1;
    rf_we     = 1'b0;
    dm_we     = 1'b0;
    fl_we     = 1'b0;
    res       = '0;
    fmr_stall = 1'b0;
    flag_sel  = instr[25:22];
    unique case (op)
      OP_AND: begin rf_we = 1'b1; res = a & b; end
      OP_OR:  begin rf_we = 1'b1; res = a | b; end
      OP_XOR: begin rf_we = 1'b1; res = a ^ b; end
      OP_ADD: begin rf_we = 1'b1; res = a + b; end
      OP_SUB: begin rf_we = 1'b1; res = a - b; end
      OP_LDI: begin rf_we = 1'b1; res = {{11{instr[20]}}, instr[20:0]}; end
      OP_LD:  begin rf_we = 1'b1; res = dmem[addr[DA_W-1:0]]; end
      OP_ST:  dm_we = 1'b1;
      OP_CMP: fl_we = 1'b1;
      OP_FBR: begin rf_we = 1'b1; flag_sel = instr[15:12]; res = XLEN'(flags[flag_sel[2:0]]); end
      OP_FMR: begin
        rf_we     = !fmr_pending;
        res       = XLEN'(fmr_result);
        done      = valid && !fmr_pending;
        fmr_stall = valid && fmr_pending;
      end
      OP_BR: begin
        br_taken  = (flag_sel[3] == 1'b0) && flags[flag_sel[2:0]];
        br_offset = {{10{instr[21]}}, instr[21:0]};
      end
      OP_J: begin
        br_taken  = 1'b1;
        br_offset = {{6{instr[25]}}, instr[25:0]};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= 8'b0000_0001;
      for (int i = 0; i < NREGS; i++) rf[i] <= '0;
    end else if (valid && done) begin
      if (rf_we) rf[rd] <= res;
      if (fl_we) flags  <= new_flags;
    end
  end

  always_ff @(posedge clk) begin
    if (valid && done && dm_we) dmem[addr[DA_W-1:0]] <= rf[rd];
  end
endmodule
