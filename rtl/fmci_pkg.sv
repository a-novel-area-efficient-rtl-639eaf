// fmci_pkg -- shared constants and types of the folded modified convolutional
// interleaver (FMCI) and its deinterleaver.
//
// The design is the 4x4 case (M = 4 rows, N = 4 columns, J = 1) of the FMCI
// scheme. Four symbols, named c, d, b, a in arrival order, form one folding
// period; every switching decision is taken at a time instance 4l+m, m = slot.
//
// The two register-allocation tables below are the heart of the design. They
// were obtained by linear lifetime analysis followed by forward-backward
// register allocation:
//
//   interleaver, per-symbol delay (cycles): c = 2, d = 3, b = 1, a = 2
//   lifetimes  : c live {1,2}, d live {2,3,4}, b live {3}, a live {4,5}
//   live count per slot = 2, 2, 2, 2 -> two registers R1, R2
//
//   cycle slot    |  0   1   2   3
//   R1 holds      |  d   c   d   b      (d: R1 -> R2 -> back to R1)
//   R2 holds      |  a   a   c   d
//   output        | R1  R2  R2  R1      = d a c b
//
// The c, d and b lifetimes, the forward-backward moves and the R1/R2 output
// instances 4l+0, 4l+3 (R1) and 4l+2 (R2) follow the FMCI paper. Symbol a is
// this design's own choice: a zero-delay a would leave the output at 4l+3
// with two symbols and 4l+1 with none, so a is held two cycles in R2 and
// leaves in the free instance 4l+1. This keeps the register count at two.
//
// The deinterleaver adds the complementary delay (3 - interleaver delay) so
// that every symbol leaves the pair exactly 3 cycles after it entered:
//
//   deinterleaver input per slot : d a c b ; delay d = 0, a = 1, c = 1, b = 2
//   cycle slot    |  0   1   2   3
//   R holds       |  b   b   a   c
//   output        | in   R   R   R      = d b a c  (original order c d b a
//                                                    shifted by 3 cycles)
package fmci_pkg;

  // Folding period: number of time instances 4l+m (N columns of the 4x4 case).
  localparam int unsigned N_SLOTS = 4;
  localparam int unsigned SLOT_W  = $clog2(N_SLOTS);

  typedef logic [SLOT_W-1:0] slot_t;

  // Cycles from a symbol entering the interleaver to its first appearance on
  // the interleaver output (symbol c of the first period, slot 2).
  localparam int unsigned INT_FIRST_OUT = 2;
  // Constant delay of every symbol through interleaver plus deinterleaver.
  localparam int unsigned E2E_DELAY     = 3;

  // Source of a register's next value, or of a block output.
  typedef enum logic [1:0] {
    SRC_IN   = 2'd0,   // the symbol arriving in this slot
    SRC_R1   = 2'd1,   // register R1 (forward move into R2, or output)
    SRC_R2   = 2'd2,   // register R2 (backward move into R1, or output)
    SRC_HOLD = 2'd3    // keep the register's own value
  } src_e;

  typedef src_e src_table_t [N_SLOTS];

  // Interleaver, indexed by the current slot. R*_NEXT gives what is loaded at
  // the end of the slot; OUT gives what drives the output during the slot.
  localparam src_table_t INT_R1_NEXT = '{SRC_IN,   SRC_IN, SRC_IN, SRC_R2};
  localparam src_table_t INT_R2_NEXT = '{SRC_HOLD, SRC_R1, SRC_R1, SRC_IN};
  localparam src_table_t INT_OUT     = '{SRC_R1,   SRC_R2, SRC_R2, SRC_R1};

  // Deinterleaver: one register, referred to as R1 in the OUT table.
  localparam src_table_t DEI_R_NEXT  = '{SRC_HOLD, SRC_IN, SRC_IN, SRC_IN};
  localparam src_table_t DEI_OUT     = '{SRC_IN,   SRC_R1, SRC_R1, SRC_R1};

endpackage
