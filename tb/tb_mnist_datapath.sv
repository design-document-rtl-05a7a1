// tb_mnist_datapath: arithmetic test of the MAC datapath.
// FC1: 40 random neurons (bias, then 20 signed 8x8 MACs); hid_wdata must be
// max(0, bias + sum) computed here in 64-bit integers; both the clamped and
// the passed cases occur. FC2: ten neurons of 30 signed 32x8 MACs into the
// 48-bit accumulator, stored to out_regs[j], then a ten-cycle argmax with
// latch_result in the last cycle; result and confidence must match the
// reference (first maximum, low 32 bits). Repeated for random trials,
// including one where all outputs tie.
module tb_mnist_datapath;
  import mnist_pkg::*;
  localparam int NO = 10;

  logic        clk = 0, reset;
  logic [7:0]  fc1_w_rdata, img_rdata, fc2_w_rdata;
  logic [31:0] fc1_b_rdata, hid_rdata, fc2_b_rdata;
  logic        fc1_bias_load, fc1_mac, fc2_bias_load, fc2_mac, out_we, argmax_en, latch_result;
  logic [6:0]  out_idx;
  logic [31:0] hid_wdata;
  logic        argmax_last;
  logic [3:0]  result;
  logic [31:0] confidence;
  int checks = 0, failures = 0;
  int n_clamp = 0, n_pass = 0;

  mnist_datapath #(.NO(NO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle_ctrl();
    fc1_bias_load = 0; fc1_mac = 0; fc2_bias_load = 0; fc2_mac = 0;
    out_we = 0; argmax_en = 0; latch_result = 0;
  endtask

  task automatic step();
    @(posedge clk); #1 idle_ctrl();
  endtask

  task automatic fc1_neuron(input bit want_negative);
    longint acc;
    logic signed [31:0] b;
    b = $signed(32'($urandom_range(0, 200000))) - 32'sd100000;
    fc1_b_rdata = b; fc1_bias_load = 1; acc = longint'(b);
    step();
    for (int i = 0; i < 20; i++) begin
      logic signed [7:0] w, x;
      w = 8'($urandom); x = 8'($urandom);
      if (want_negative && (w * x > 0)) w = -w;
      if (!want_negative && (w * x < 0)) w = -w;
      if (w == -128) w = 127;  // -(-128) would wrap
      fc1_w_rdata = w; img_rdata = x; fc1_mac = 1;
      acc += longint'(w) * longint'(x);
      step();
    end
    if (acc < 0) n_clamp++; else n_pass++;
    check(hid_wdata == ((acc < 0) ? 32'd0 : 32'(acc)),
          $sformatf("ReLU out %0d, expected max(0,%0d)", hid_wdata, acc));
  endtask

  task automatic fc2_layer(input bit all_tie);
    longint outs [NO];
    int ref_i;
    for (int j = 0; j < NO; j++) begin
      longint acc;
      logic signed [31:0] b;
      b = all_tie ? 32'sd12345 : $signed($urandom);
      fc2_b_rdata = b; fc2_bias_load = 1; acc = longint'(b);
      step();
      for (int i = 0; i < 30; i++) begin
        logic signed [31:0] h;
        logic signed [7:0] w;
        h = all_tie ? 32'sd0 : $signed($urandom);
        w = 8'($urandom);
        hid_rdata = h; fc2_w_rdata = w; fc2_mac = 1;
        acc += longint'(h) * longint'(w);
        step();
      end
      outs[j] = acc;
      out_idx = 7'(j); out_we = 1;
      step();
    end
    ref_i = 0;
    for (int j = 1; j < NO; j++) if (outs[j] > outs[ref_i]) ref_i = j;
    for (int c = 0; c < NO; c++) begin
      argmax_en = 1;
      #1;
      check(argmax_last == (c == NO - 1), "argmax last flag");
      latch_result = argmax_last;
      step();
    end
    check(result == 4'(ref_i) && confidence == 32'(outs[ref_i]),
          $sformatf("argmax %0d conf %h, expected %0d %h", result, confidence, ref_i, 32'(outs[ref_i])));
  endtask

  initial begin
    reset = 1; idle_ctrl(); out_idx = 0;
    fc1_w_rdata = 0; img_rdata = 0; fc1_b_rdata = 0; fc2_w_rdata = 0; hid_rdata = 0; fc2_b_rdata = 0;
    step(); reset = 0;
    for (int n = 0; n < 40; n++) fc1_neuron(n[0]);
    check(n_clamp > 0 && n_pass > 0, "both ReLU cases exercised");
    fc2_layer(1'b1);
    for (int t = 0; t < 10; t++) fc2_layer(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
