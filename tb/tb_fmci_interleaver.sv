// tb_fmci_interleaver -- self-checking test of the folded FMCI interleaver.
//
// Random symbols are fed with random stalls. The reference is the
// convolutional-interleaver view of the design, not its register table: the
// symbol leaving in slot m (0..3) is the one that entered DLY_BY_OUT[m]
// accepted cycles earlier, i.e. d (delay 3), a (2), c (2), b (1). The test
// also checks that out_valid rises on the second accepted symbol after reset
// (first output two cycles after the first input) and stays high, and that
// stalls (en = 0) were exercised.
module tb_fmci_interleaver;
  import fmci_pkg::*;

  localparam int unsigned DATA_W = 8;
  localparam int DLY_BY_OUT [4] = '{3, 2, 2, 1};

  logic              clk = 0;
  logic              rst_n = 0;
  logic              en = 0;
  logic [DATA_W-1:0] sym_in = '0;
  logic [DATA_W-1:0] sym_out;
  logic              out_valid;
  slot_t             slot;

  int checks = 0, failures = 0;
  int stalls = 0;
  logic [DATA_W-1:0] hist [$];   // accepted inputs, oldest first
  int first_valid = -1;

  fmci_interleaver #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, m;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    n = 0;
    while (n < 1000) begin
      en     = ($urandom_range(4) != 0);
      sym_in = DATA_W'($urandom);
      if (!en) stalls++;
      #1;
      if (en) begin
        m = n % 4;
        if (out_valid && first_valid < 0) first_valid = n;
        if (n >= 2) begin
          checks++;
          if (!out_valid) begin failures++; $display("out_valid low at symbol %0d", n); end
          if (sym_out != hist[n - DLY_BY_OUT[m]]) begin
            failures++;
            $display("symbol %0d slot %0d: got %h expected %h", n, m, sym_out, hist[n - DLY_BY_OUT[m]]);
          end
        end else begin
          checks++;
          if (out_valid) begin failures++; $display("out_valid high too early at %0d", n); end
        end
        hist.push_back(sym_in);
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (first_valid != INT_FIRST_OUT) begin
      failures++;
      $display("first valid output at symbol %0d, expected %0d", first_valid, INT_FIRST_OUT);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
