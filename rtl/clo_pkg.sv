// clo_pkg: shared constants and types of the Clo-HDnn accelerator.
//
// Instruction formats (20 bits, as the accelerator's ISA defines them):
//   memory     : opcode[19:16] | src[15] | dst[14] | burst[13:12] | address[11:0]
//   arithmetic : opcode[19:16] | operand[15:0]
// The field widths (4/2/2/12 and 4/16) follow the ISA; the split of the two-bit
// src/dst field into one bit each and the opcode numbering are this design's
// own choice.
//
// Host link: a 37-bit word in, a 34-bit word out (widths from the chip's FIFO
// module). The tag layout inside those words is this design's own choice.
package clo_pkg;

  typedef enum logic [3:0] {
    OP_STORE_BUF      = 4'd0,
    OP_READ_BUF       = 4'd1,
    OP_HD_ENC_PRELOAD = 4'd2,
    OP_HD_ENC_SEG     = 4'd3,
    OP_HD_TRAIN       = 4'd4,
    OP_HD_INFER       = 4'd5,
    OP_FE_LOAD        = 4'd6,
    OP_FE_CONFIG      = 4'd7,
    OP_FE_INFER       = 4'd8
  } opcode_e;

  typedef struct packed {
    opcode_e     opcode;
    logic        src;    // 0: WCFE side, 1: HD side
    logic        dst;    // 0: WCFE side, 1: HD side
    logic [1:0]  burst;  // burst length = 2**burst words
    logic [11:0] addr;   // addr[11:9] picks the buffer, addr[8:0] the word
  } mem_instr_t;

  typedef struct packed {
    opcode_e     opcode;
    logic [15:0] operand;
  } arith_instr_t;

  // Buffer selectors carried in addr[11:9] of a memory instruction.
  localparam logic [2:0] BUF_WCFE_ACT  = 3'd0;  // activation memory
  localparam logic [2:0] BUF_WCFE_IDX  = 3'd1;  // centroid index memory
  localparam logic [2:0] BUF_WCFE_WGT  = 3'd2;  // centroid weight memory
  localparam logic [2:0] BUF_WCFE_OUT  = 3'd3;  // output feature buffer (read only)
  localparam logic [2:0] BUF_HD_INPUT  = 3'd0;  // HD input buffer (features)
  localparam logic [2:0] BUF_HD_KWGT   = 3'd1;  // Kronecker encoder weight buffer
  localparam logic [2:0] BUF_HD_CHV    = 3'd2;  // class hypervector cache
  localparam logic [2:0] BUF_HD_CLSEL  = 3'd3;  // class whose CHV the host accesses

  // Host word tags (top 5 bits of the 37-bit input word).
  localparam logic [4:0] TAG_DATA  = 5'd0;
  localparam logic [4:0] TAG_INSTR = 5'd1;

  // Output word tags (top 2 bits of the 34-bit output word).
  localparam logic [1:0] OTAG_DATA   = 2'd1;
  localparam logic [1:0] OTAG_RESULT = 2'd2;

endpackage
