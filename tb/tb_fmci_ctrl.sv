// tb_fmci_ctrl -- self-checking test of the folding controller.
//
// Drives en with random stalls and compares slot and primed with a reference
// count of accepted symbols kept in the testbench: slot must equal the count
// modulo 4, primed must rise exactly when the count reaches FILL and stay
// high. Also checks that a mid-run reset returns slot to 0.
module tb_fmci_ctrl;
  import fmci_pkg::*;

  localparam int unsigned FILL = 3;

  logic  clk = 0;
  logic  rst_n = 0;
  logic  en = 0;
  slot_t slot;
  logic  primed;

  int checks = 0, failures = 0;
  int accepted = 0;
  int stalls = 0;

  fmci_ctrl #(.FILL(FILL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (slot != slot_t'(accepted % N_SLOTS) || primed != (accepted >= FILL)) begin
      failures++;
      $display("mismatch after %0d symbols: slot=%0d primed=%0b", accepted, slot, primed);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check_state();
    for (int i = 0; i < 400; i++) begin
      en = ($urandom_range(3) != 0);
      if (!en) stalls++;
      @(posedge clk);
      if (en) accepted++;
      @(negedge clk);
      check_state();
      if (i == 200) begin
        rst_n = 0;
        en = 1;
        @(posedge clk);
        accepted = 0;
        @(negedge clk);
        rst_n = 1;
        check_state();
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
