// fmci_interleaver -- folded modified convolutional interleaver, 4x4 case.
//
// A convolutional interleaver gives each of the N symbol positions of a
// period its own delay. Built directly, every position owns a shift register.
// Folded, the positions share a minimum set of registers: lifetime analysis
// shows that at most two symbols are ever waiting at once, and the
// forward-backward allocation table (fmci_pkg::INT_*) says, for each time
// instance 4l+m, which register takes the incoming symbol, which symbol moves
// forward R1 -> R2 or backward R2 -> R1, and which register feeds the output.
//
// Symbols arrive in the order c, d, b, a (slots 0..3) and leave as
// d, a, c, b in slots 0..3; c, d, b, a are delayed by 2, 3, 1 and 2 cycles.
// Storage is exactly two DATA_W-bit registers (M - 2 = 2 for M = 4).
//
// Interface: one symbol per cycle with en = 1; en = 0 stalls everything
// (registers and schedule hold). sym_out is a multiplexer of R1/R2, so it
// carries no combinational path from sym_in. out_valid rises with the first
// real output, two accepted symbols after reset, and then stays high;
// sym_out is meaningful in cycles where en and out_valid are both 1.
//
// The register count, the R1/R2 moves for c, d and b and the output
// instances follow the FMCI paper; the handling of symbol a (held two cycles
// in R2), the enable and the valid flag are this design's choices.
module fmci_interleaver
  import fmci_pkg::slot_t, fmci_pkg::src_e, fmci_pkg::SRC_IN, fmci_pkg::SRC_R1, fmci_pkg::SRC_R2,
         fmci_pkg::INT_FIRST_OUT, fmci_pkg::INT_R1_NEXT, fmci_pkg::INT_R2_NEXT, fmci_pkg::INT_OUT;
#(
  parameter int unsigned DATA_W = 1   // bits per symbol ("one bit latches")
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] sym_in,
  output logic [DATA_W-1:0] sym_out,
  output logic              out_valid,
  output slot_t             slot
);

  logic [DATA_W-1:0] r1, r2;
  logic [DATA_W-1:0] r1_d, r2_d;
  logic              primed;

  fmci_ctrl #(.FILL(INT_FIRST_OUT)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .slot  (slot),
    .primed(primed)
  );

  function automatic logic [DATA_W-1:0] pick(src_e src, logic [DATA_W-1:0] din,
                                              logic [DATA_W-1:0] a1,
                                              logic [DATA_W-1:0] a2,
                                              logic [DATA_W-1:0] own);
    unique case (src)
      SRC_IN:  return din;
      SRC_R1:  return a1;
      SRC_R2:  return a2;
      default: return own;
    endcase
  endfunction

  always_comb begin
    r1_d    = pick(INT_R1_NEXT[slot], sym_in, r1, r2, r1);
    r2_d    = pick(INT_R2_NEXT[slot], sym_in, r1, r2, r2);
    sym_out = pick(INT_OUT[slot],     sym_in, r1, r2, '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
    end else if (en) begin
      r1 <= r1_d;
      r2 <= r2_d;
    end
  end

  assign out_valid = primed;

endmodule
