// tb_fmci_deinterleaver -- self-checking test of the folded deinterleaver.
//
// The testbench builds the interleaved stream itself from a random source
// sequence s[k] (slot order d, a, c, b: position n carries s[n - delay] with
// delays 3, 2, 2, 1) and feeds it, with random stalls, to the deinterleaver.
// Every output from the third accepted symbol on must equal s[n - 3], and
// out_valid must rise exactly there.
module tb_fmci_deinterleaver;
  import fmci_pkg::*;

  localparam int unsigned DATA_W = 6;
  localparam int unsigned LEN    = 1200;
  localparam int DLY_BY_SLOT [4] = '{3, 2, 2, 1};

  logic              clk = 0;
  logic              rst_n = 0;
  logic              en = 0;
  logic [DATA_W-1:0] sym_in = '0;
  logic [DATA_W-1:0] sym_out;
  logic              out_valid;
  slot_t             slot;

  int checks = 0, failures = 0;
  int stalls = 0;
  logic [DATA_W-1:0] src [LEN];

  fmci_deinterleaver #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    foreach (src[k]) src[k] = DATA_W'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    n = 0;
    while (n < LEN) begin
      int d;
      en = ($urandom_range(4) != 0);
      if (!en) stalls++;
      d = DLY_BY_SLOT[n % 4];
      sym_in = (n >= d) ? src[n - d] : DATA_W'($urandom);
      #1;
      if (en) begin
        checks++;
        if (out_valid != (n >= int'(E2E_DELAY))) begin
          failures++;
          $display("symbol %0d: out_valid=%0b", n, out_valid);
        end
        if (n >= int'(E2E_DELAY)) begin
          checks++;
          if (sym_out != src[n - E2E_DELAY]) begin
            failures++;
            $display("symbol %0d: got %h expected %h", n, sym_out, src[n - E2E_DELAY]);
          end
        end
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
