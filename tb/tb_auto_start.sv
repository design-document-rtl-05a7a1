// tb_auto_start: checks the one-shot start counter with an 8-bit counter.
// Run 1: load_mode low; exactly one pulse, exactly 255 cycles after reset
// is released, and none afterwards. Run 2: load_mode held high across the
// firing point; no pulse ever appears (the pulse is eaten, not delayed).
module tb_auto_start;
  localparam int CNT_W = 8;
  logic clk = 0, reset, load_mode, pulse;
  int checks = 0, failures = 0;
  int cyc, npulse, first_at;

  auto_start #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit lm, output int n, output int first);
    reset = 1; load_mode = lm;
    @(posedge clk); #1;
    reset = 0;
    n = 0; first = -1;
    for (int c = 0; c < 700; c++) begin
      if (pulse) begin
        n++;
        if (first < 0) first = c;
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    run(1'b0, npulse, first_at);
    checks++;
    if (npulse != 1) begin failures++; $display("FAIL: %0d pulses", npulse); end
    checks++;
    if (first_at != (1 << CNT_W) - 1) begin
      failures++; $display("FAIL: pulse at cycle %0d, expected %0d", first_at, (1 << CNT_W) - 1);
    end
    run(1'b1, npulse, first_at);
    checks++;
    if (npulse != 0) begin failures++; $display("FAIL: %0d pulses under load_mode", npulse); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
