// fmci_deinterleaver -- folded deinterleaver matching fmci_interleaver.
//
// The deinterleaver undoes the interleaver's permutation by giving every
// symbol the complementary delay, so that all symbols see the same total
// delay of three cycles: d passes straight through, a and c wait one cycle,
// b waits two. Lifetime analysis of these delays needs one register, and the
// allocation table fmci_pkg::DEI_* gives, per time instance 4l+m, whether the
// register loads the incoming symbol or holds, and whether the output takes
// the register or the incoming symbol.
//
// Input order per period (slots 0..3): d, a, c, b, as produced by
// fmci_interleaver. Output order: d, b, a, c in slots 0..3, which is the
// original c, d, b, a sequence delayed by exactly three cycles.
//
// Interface: en = 1 accepts one symbol, en = 0 stalls. The slot counter must
// be aligned with the interleaver's: both are reset together and share en.
// out_valid rises three accepted symbols after reset (first symbol of the
// original stream) and stays high. In slot 0 sym_out is a combinational copy
// of sym_in.
//
// The FMCI paper only names the deinterleaver and quotes the
// end-to-end delay it measures; this table was derived the same way the
// paper derives the interleaver's.
module fmci_deinterleaver
  import fmci_pkg::slot_t, fmci_pkg::SRC_IN, fmci_pkg::E2E_DELAY,
         fmci_pkg::DEI_R_NEXT, fmci_pkg::DEI_OUT;
#(
  parameter int unsigned DATA_W = 1   // bits per symbol
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] sym_in,
  output logic [DATA_W-1:0] sym_out,
  output logic              out_valid,
  output slot_t             slot
);

  logic [DATA_W-1:0] r;
  logic              primed;

  fmci_ctrl #(.FILL(E2E_DELAY)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .slot  (slot),
    .primed(primed)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)
      r <= '0;
    else if (en && DEI_R_NEXT[slot] == SRC_IN)
      r <= sym_in;
  end

  assign sym_out   = (DEI_OUT[slot] == SRC_IN) ? sym_in : r;
  assign out_valid = primed;

endmodule
