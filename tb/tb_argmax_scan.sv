// tb_argmax_scan: random and hand-made vectors of ten signed 48-bit values.
// For each vector en is held for exactly ten cycles; the test checks that
// last rises only in the tenth, and that idx_next/best_next then equal the
// first index of the maximum computed here by a plain loop. Vectors include
// ties, all-equal values and all-negative values.
module tb_argmax_scan;
  localparam int N = 10;
  localparam int W = 48;
  logic clk = 0, reset, en, last;
  logic signed [W-1:0] vals [N];
  logic [3:0] idx_next;
  logic signed [W-1:0] best_next;
  int checks = 0, failures = 0;

  argmax_scan #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan_and_check();
    int ref_i;
    logic signed [W-1:0] ref_v;
    ref_i = 0; ref_v = vals[0];
    for (int k = 1; k < N; k++)
      if (vals[k] > ref_v) begin ref_v = vals[k]; ref_i = k; end
    en = 1;
    for (int c = 0; c < N; c++) begin
      #1;
      checks++;
      if (last !== (c == N - 1)) begin
        failures++; $display("FAIL: last=%0b in scan cycle %0d", last, c);
      end
      if (c == N - 1) begin
        checks++;
        if (idx_next !== 4'(ref_i) || best_next !== ref_v) begin
          failures++;
          $display("FAIL: idx=%0d best=%0d expected %0d %0d", idx_next, best_next, ref_i, ref_v);
        end
      end
      @(posedge clk);
    end
    #1 en = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    reset = 1; en = 0;
    foreach (vals[k]) vals[k] = '0;
    @(posedge clk); #1 reset = 0;
    // all equal: index 0
    foreach (vals[k]) vals[k] = 48'sd7;
    scan_and_check();
    // tie between 3 and 8, both maximal
    foreach (vals[k]) vals[k] = -48'sd5;
    vals[3] = 48'sd100; vals[8] = 48'sd100;
    scan_and_check();
    // all negative, max at the end
    foreach (vals[k]) vals[k] = -48'sd1000 + 48'(k);
    scan_and_check();
    // large magnitudes near the 48-bit limits
    foreach (vals[k]) vals[k] = -(48'sd1 <<< 46);
    vals[6] = (48'sd1 <<< 46);
    scan_and_check();
    for (int t = 0; t < 200; t++) begin
      foreach (vals[k]) vals[k] = {$urandom, $urandom} >>> $urandom_range(16, 40);
      foreach (vals[k]) if ($urandom_range(0, 1)) vals[k] = -vals[k];
      if ($urandom_range(0, 3) == 0) vals[$urandom_range(0, 9)] = vals[$urandom_range(0, 9)];
      scan_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
