// tb_fmci_top -- end-to-end test of the FMCI interleaver/deinterleaver path
// at the design's default parameters.
//
// A random symbol stream with random stalls goes through fmci_top. Checked
// against models kept in the testbench:
//   * chan_sym, the interleaved stream: in slot m it carries the symbol that
//     entered 3, 2, 2, 1 accepted cycles earlier (m = 0, 1, 2, 3);
//   * dec_sym, the restored stream: every symbol comes back unchanged and in
//     order exactly E2E_DELAY = 3 accepted cycles after it entered, and
//     dec_valid rises exactly there (chan_valid two cycles after the start).
// Each mechanism of the folded schedule is counted and must occur: stalls,
// forward moves R1 -> R2, backward moves R2 -> R1, the two-cycle hold of
// symbol a in R2, direct loading of R2 from the input, and the
// deinterleaver's bypass and hold slots.
module tb_fmci_top;
  import fmci_pkg::*;

  localparam int unsigned LEN = 4000;
  localparam int DLY_BY_SLOT [4] = '{3, 2, 2, 1};

  logic  clk = 0;
  logic  rst_n = 0;
  logic  en = 0;
  logic  sym_in = '0;
  logic  chan_sym, chan_valid, dec_sym, dec_valid;
  slot_t slot;

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd = 0, n_bwd = 0, n_hold = 0, n_r2_load = 0;
  int n_bypass = 0, n_dei_hold = 0;
  logic hist [$];

  fmci_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * LEN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, int n, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s at symbol %0d: got %0b expected %0b", what, n, got, exp);
    end
  endtask

  task automatic expect_count(string what, int cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else
      $display("%-28s %0d", what, cnt);
  endtask

  initial begin
    int n, m;
    logic o_in, o_r1, o_r2, o_r, o_ch, o_en;
    slot_t o_slot;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    n = 0;
    while (n < LEN) begin
      // Runs of full-rate traffic and bursts of stalls.
      en     = (n < 64) ? 1'b1 : ($urandom_range(5) != 0);
      sym_in = 1'($urandom);
      #1;
      if (!en) n_stall++;
      if (en) begin
        m = n % 4;
        expect_bit("slot", n, 1'(slot == slot_t'(m)), 1'b1);
        expect_bit("chan_valid", n, chan_valid, n >= int'(INT_FIRST_OUT));
        expect_bit("dec_valid", n, dec_valid, n >= int'(E2E_DELAY));
        if (n >= int'(INT_FIRST_OUT))
          expect_bit("chan_sym", n, chan_sym, hist[n - DLY_BY_SLOT[m]]);
        if (n >= int'(E2E_DELAY))
          expect_bit("dec_sym", n, dec_sym, hist[n - E2E_DELAY]);
        hist.push_back(sym_in);
        n++;
      end
      // Observe the register moves of the allocation tables; a move is only
      // counted when the data make it distinguishable from the alternatives.
      o_in = sym_in; o_r1 = dut.u_int.r1; o_r2 = dut.u_int.r2;
      o_r = dut.u_dei.r; o_ch = chan_sym; o_en = en; o_slot = slot;
      if (en && o_slot == 2'd0 && o_ch != o_r) begin
        n_bypass++;
        expect_bit("deinterleaver bypass", n, dec_sym, o_ch);
      end
      @(posedge clk);
      #1;
      if (o_en) begin
        case (o_slot)
          2'd0: begin
            if (o_r2 != o_in && o_r2 != o_r1 && dut.u_int.r2 == o_r2) n_hold++;
            if (o_r != o_ch && dut.u_dei.r == o_r) n_dei_hold++;
          end
          2'd1, 2'd2:
            if (o_r1 != o_r2 && o_r1 != o_in && dut.u_int.r2 == o_r1) n_fwd++;
          2'd3: begin
            if (o_r2 != o_in && o_r2 != o_r1 && dut.u_int.r1 == o_r2) n_bwd++;
            if (o_in != o_r1 && o_in != o_r2 && dut.u_int.r2 == o_in) n_r2_load++;
          end
          default: ;
        endcase
      end
      @(negedge clk);
    end
    expect_count("stall cycles", n_stall);
    expect_count("forward moves R1->R2", n_fwd);
    expect_count("backward moves R2->R1", n_bwd);
    expect_count("holds of a in R2", n_hold);
    expect_count("input loads into R2", n_r2_load);
    expect_count("deinterleaver bypasses", n_bypass);
    expect_count("deinterleaver holds", n_dei_hold);
    $display("symbols=%0d end_to_end_delay=%0d registers=%0d", n, E2E_DELAY, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
