// fnf_pkg: types and widths shared by the Fire-and-Forget memory scheduler.
//
// The scheduler has no store queue. A store is cracked into an address uop
// (STA) and a data uop (STD); the STD blindly writes its value into one load
// queue (LQ) entry chosen by a load distance prediction, and in-order commit
// with SVW-filtered load re-execution catches every wrong forward.
//
// Load and store sequence numbers (LSN, SSN) are monotonic counters. They
// are 32 bits wide here, a choice of this design: the wrap-around of the
// counters is not handled, which needs 2^32 loads or stores between resets.
// All memory accesses are aligned, full-width words (also a choice of this
// design), so one address names one word.
package fnf_pkg;

  localparam int unsigned XLEN  = 32;  // address, data and PC width
  localparam int unsigned SEQ_W = 32;  // LSN and SSN width

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [SEQ_W-1:0] seq_t;

  // Kind of instruction presented at dispatch.
  typedef enum logic [1:0] {
    OP_ALU   = 2'd0,   // any non-memory instruction
    OP_LOAD  = 2'd1,
    OP_STORE = 2'd2
  } op_kind_e;

  // Kind of uop handed to the reservation stations.
  typedef enum logic [1:0] {
    UOP_ALU = 2'd0,
    UOP_LD  = 2'd1,
    UOP_STA = 2'd2,
    UOP_STD = 2'd3
  } uop_kind_e;

endpackage
