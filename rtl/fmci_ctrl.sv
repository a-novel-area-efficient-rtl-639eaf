// fmci_ctrl -- folding controller of the FMCI interleaver and deinterleaver.
//
// A folded architecture time-multiplexes its registers: which register loads
// what, and which register drives the output, depends only on the time
// instance 4l+m of the current symbol. This block produces m (slot) with a
// modulo-N_SLOTS counter that advances once per accepted symbol (en = 1), so
// a stalled stream freezes the whole schedule. It also counts accepted
// symbols, saturating at FILL, and raises primed once FILL symbols have been
// accepted: from then on every output of the datapath is a real symbol.
//
// Interface: clk, active-low synchronous rst_n, en (one symbol this cycle).
// slot and primed are registered and describe the symbol presented in the
// current cycle. After reset slot = 0 and primed = 0.
//
// The counter itself is the control circuit the folding transformation
// calls for; the primed flag and the stall behaviour are this design's own.
module fmci_ctrl
  import fmci_pkg::slot_t, fmci_pkg::N_SLOTS, fmci_pkg::INT_FIRST_OUT;
#(
  parameter int unsigned FILL = INT_FIRST_OUT   // symbols accepted before outputs are valid
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  output slot_t slot,
  output logic  primed
);

  localparam int unsigned CNT_W = $clog2(FILL + 1) < 1 ? 1 : $clog2(FILL + 1);

  logic [CNT_W-1:0] accepted;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot     <= '0;
      accepted <= '0;
    end else if (en) begin
      slot <= (slot == slot_t'(N_SLOTS - 1)) ? '0 : slot + slot_t'(1);
      if (accepted != CNT_W'(FILL))
        accepted <= accepted + CNT_W'(1);
    end
  end

  assign primed = (accepted == CNT_W'(FILL));

endmodule
