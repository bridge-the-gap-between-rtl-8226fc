// uqcp_pkg: shared constants, instruction encoding and bundle types of the
// unified quantum control processor (UQCP).
//
// The instruction set follows the hybrid ISA of the design: eQASM-style
// classical instructions (CMP, BR, FBR, LD/ST, FMR, ALU), quantum timing
// (QWAIT, QWAITR), quantum bundles with up to two operations, single-qubit
// mask registers (SMSO, SMSOL), two-qubit pair registers (SITO, SITOL), QSET,
// histogram control (SRA, FHR) and the neutral-atom initialisation commands
// (IIF, IAD, IAS, IAM), plus J and END. Standard instructions are 32 bits; the
// long forms SMSOL and SITOL are 128 bits (four words). The instruction names,
// the two instruction lengths, the two-operation bundle and the seven-pair
// limit of SITOL come from the design; every bit position below is this
// implementation's own encoding.
//
// Word 0 layout (bit 31 is the MSB):
//   bundle   : [31:29]=3'b111, [28:26] PI, [25:18] op0, [17:13] reg0,
//              [12:5] op1, [4:0] reg1   (reg: [4]=1 two-qubit T reg, [3:0] index)
//   others   : [31:26] opcode, rd [25:21], rs [20:16], rt [15:11]
//   BR       : flag [25:22], signed word offset [21:0]
//   J        : signed word offset [25:0]
//   LDI      : rd, signed immediate [20:0]
//   LD / ST  : rd (data register), rs (base), signed offset [15:0]
//   FBR      : rd, flag [15:12]
//   FMR      : rd, qubit index [15:0]
//   QWAIT    : immediate [19:0];  QWAITR: rs
//   SMSO     : Sd [25:22], offset [21:15], qubit list [14:0]
//   SMSOL    : Sd [25:22], offset [21:15]; words 1..3 = 96-bit qubit list
//   SITO     : Td [25:22], offset [21:15], source [13:7], target [6:0]
//   SITOL    : Td [25:22], offset [21:15], pair count [14:12];
//              words 1..3: pair k = {source[12k+11:12k+6], target[12k+5:12k]}
//              (6-bit relative indices, widened to REL_W with zeros)
//   QSET     : register [25:21] (as reg above), bit index [20:14], value [13]
//   FHR      : rt = result-memory base entry
package uqcp_pkg;

  localparam int unsigned XLEN     = 32;   // classical register width
  localparam int unsigned NREGS    = 32;   // classical registers
  localparam int unsigned CW_W     = 8;    // micro-code (codeword) width
  localparam int unsigned TS_W     = 32;   // timestamp width
  localparam int unsigned NQREG    = 16;   // S and T registers each
  localparam int unsigned NPAIRS   = 7;    // pairs per T register
  localparam int unsigned REL_W    = 7;    // relative qubit index in SITO(L)
  localparam int unsigned OFF_W    = 7;    // offset field
  localparam int unsigned SLIST_W  = 15;   // SMSO short qubit list
  localparam int unsigned LONG_W   = 96;   // payload of a long instruction

  typedef enum logic [5:0] {
    OP_NOP    = 6'h00,
    OP_CMP    = 6'h01,
    OP_BR     = 6'h02,
    OP_FBR    = 6'h03,
    OP_LD     = 6'h04,
    OP_ST     = 6'h05,
    OP_FMR    = 6'h06,
    OP_AND    = 6'h07,
    OP_OR     = 6'h08,
    OP_XOR    = 6'h09,
    OP_ADD    = 6'h0A,
    OP_SUB    = 6'h0B,
    OP_LDI    = 6'h0C,
    OP_J      = 6'h0D,
    OP_END    = 6'h0E,
    OP_QWAIT  = 6'h10,
    OP_QWAITR = 6'h11,
    OP_SMSO   = 6'h12,
    OP_SMSOL  = 6'h13,
    OP_SITO   = 6'h14,
    OP_SITOL  = 6'h15,
    OP_QSET   = 6'h16,
    OP_SRA    = 6'h18,
    OP_FHR    = 6'h19,
    OP_IIF    = 6'h1C,
    OP_IAD    = 6'h1D,
    OP_IAS    = 6'h1E,
    OP_IAM    = 6'h1F
  } opcode_e;

  // comparison flags kept by CMP, tested by BR and read by FBR
  typedef enum logic [3:0] {
    FL_ALWAYS = 4'd0, FL_NEVER = 4'd1, FL_EQ  = 4'd2, FL_NE  = 4'd3,
    FL_LT     = 4'd4, FL_GE    = 4'd5, FL_LTU = 4'd6, FL_GEU = 4'd7
  } flag_e;

  // gate-operation kinds held in the gate-op lookup table
  typedef enum logic [1:0] {
    GK_NONE = 2'd0, GK_SINGLE = 2'd1, GK_TWO = 2'd2, GK_MEAS = 2'd3
  } gate_kind_e;

  typedef struct packed {
    gate_kind_e        kind;
    logic [CW_W-1:0]   cw_a;   // single-qubit / source / measure codeword
    logic [CW_W-1:0]   cw_b;   // target codeword of a two-qubit gate
  } lut_entry_t;

  // switch-control modalities
  typedef enum logic [1:0] {
    MODE_SC = 2'd0, MODE_NA = 2'd1, MODE_TI = 2'd2
  } mode_e;

  function automatic logic is_bundle(input logic [31:0] w);
    return w[31:29] == 3'b111;
  endfunction

  function automatic logic is_long(input logic [31:0] w);
    return !is_bundle(w) && (w[31:26] == OP_SMSOL || w[31:26] == OP_SITOL);
  endfunction

  // quantum instructions go to the quantum decoder, the rest to the classical core
  function automatic logic is_quantum(input logic [31:0] w);
    logic [5:0] op;
    op = w[31:26];
    return is_bundle(w) || (op >= 6'h10 && op <= 6'h1F);
  endfunction

endpackage
