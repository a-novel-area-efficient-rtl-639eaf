// fmci_top -- end-to-end FMCI path: interleaver, channel link, deinterleaver.
//
// The transmit side reorders the coded symbol stream with the folded
// modified convolutional interleaver (two registers); the receive side puts
// the symbols back in order with the folded deinterleaver (one register)
// before they go to the MAP decoder. Here the two are joined directly, the
// arrangement over which the end-to-end delay is measured; the interleaved
// stream is also brought out (chan_sym) so the permutation can be observed.
// The MAP decoder itself is outside this design: its input is dec_sym /
// dec_valid.
//
// Timing: one symbol per cycle while en = 1, en = 0 stalls both halves. A
// symbol entering on sym_in leaves on dec_sym three accepted cycles later;
// dec_valid is high from the first such symbol on. Total storage is three
// DATA_W-bit registers plus the two slot counters.
module fmci_top
  import fmci_pkg::slot_t;
#(
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] sym_in,
  output logic [DATA_W-1:0] chan_sym,
  output logic              chan_valid,
  output logic [DATA_W-1:0] dec_sym,
  output logic              dec_valid,
  output slot_t             slot
);

  slot_t dei_slot;

  fmci_interleaver #(.DATA_W(DATA_W)) u_int (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .sym_in   (sym_in),
    .sym_out  (chan_sym),
    .out_valid(chan_valid),
    .slot     (slot)
  );

  fmci_deinterleaver #(.DATA_W(DATA_W)) u_dei (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .sym_in   (chan_sym),
    .sym_out  (dec_sym),
    .out_valid(dec_valid),
    .slot     (dei_slot)
  );

  // Both halves advance on the same en from the same reset, so their
  // folding schedules stay in step.
  always_ff @(posedge clk)
    if (rst_n) assert (dei_slot == slot) else $error("FMCI slot counters out of step");

endmodule
