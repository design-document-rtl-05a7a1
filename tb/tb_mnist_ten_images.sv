// tb_mnist_ten_images: the host's "run all ten in sequence" use, at the
// full network size with every parameter of the peripheral at its default.
//
// Weights and biases are loaded once (random signed INT8 weights, random
// INT32 biases); then ten generated images (random signed INT8, pixel - 128)
// are loaded one after another, each followed by start, a STATUS.done poll,
// RESULT/CONFIDENCE reads and clear_done, exactly as the driver does. For
// every image the 128 hidden activations, 10 outputs, the argmax,
// CONFIDENCE, HEX0 and the 203,826-cycle latency are compared with a
// reference forward pass computed here in 64-bit integers.
module tb_mnist_ten_images;
  import mnist_pkg::*;
  localparam int NI = N_IN, NH = N_HID, NO = N_OUT;
  localparam int T_INFER = NH * (4 + 2 * NI) + NO * (4 + 2 * NH) + NO;

  logic        clk = 0, reset;
  logic        chipselect, read, write;
  logic [3:0]  address;
  logic [31:0] writedata, readdata;
  logic [6:0]  HEX0, HEX1, HEX2, HEX3, HEX4, HEX5;
  int checks = 0, failures = 0;

  mnist_accel dut (.*);

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte w1 [NH*NI];
  int  b1 [NH];
  byte w2 [NO*NH];
  int  b2 [NO];
  byte img [NI];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [31:0] d);
    chipselect = 1; write = 1; read = 0; address = a; writedata = d;
    @(posedge clk); #1;
    chipselect = 0; write = 0;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    chipselect = 1; read = 1; write = 0; address = a;
    #1 d = readdata;
    @(posedge clk); #1;
    chipselect = 0; read = 0;
  endtask

  longint hid_ref [NH];
  longint out_ref [NO];
  int     arg_ref, n_clamp;

  string glyph [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                        "abc", "abcdefg", "abcdfg"};
  function automatic logic [6:0] hex_of(input int d);
    logic [6:0] s = 7'h7f;
    foreach (glyph[d][k]) s[glyph[d][k] - "a"] = 1'b0;
    return s;
  endfunction

  logic [31:0] rd;
  int n;
  int n_img = 0;

  initial begin
    reset = 1; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0;
    foreach (w1[k]) w1[k] = byte'($urandom);
    foreach (b1[k]) b1[k] = int'($urandom_range(0, 200000)) - 100000;
    foreach (w2[k]) w2[k] = byte'($urandom);
    foreach (b2[k]) b2[k] = int'($urandom_range(0, 20000000)) - 10000000;

    repeat (3) @(posedge clk); #1 reset = 0;
    bus_read(REG_VERSION, rd);
    check(rd == 32'h4D4E5301, "VERSION");

    bus_write(REG_CONTROL, 32'h2);
    bus_write(REG_LOAD_TARGET, 32'(TGT_FC1_W));
    foreach (w1[k]) bus_write(REG_LOAD_DATA, {24'd0, w1[k]});
    bus_write(REG_LOAD_TARGET, 32'(TGT_FC1_B));
    foreach (b1[k]) bus_write(REG_LOAD_DATA, b1[k]);
    bus_write(REG_LOAD_TARGET, 32'(TGT_FC2_W));
    foreach (w2[k]) bus_write(REG_LOAD_DATA, {24'd0, w2[k]});
    bus_write(REG_LOAD_TARGET, 32'(TGT_FC2_B));
    foreach (b2[k]) bus_write(REG_LOAD_DATA, b2[k]);
    for (int r = 0; r < 10; r++) begin
      foreach (img[k]) img[k] = byte'($urandom);
      bus_write(REG_CONTROL, 32'h2);
      // reference forward pass for this image
      n_clamp = 0;
      for (int j = 0; j < NH; j++) begin
        longint acc;
        acc = longint'(b1[j]);
        for (int i = 0; i < NI; i++) acc += longint'(w1[j*NI+i]) * longint'(img[i]);
        if (acc < 0) n_clamp++;
        hid_ref[j] = (acc < 0) ? 0 : acc;
      end
      for (int j = 0; j < NO; j++) begin
        longint acc;
        acc = longint'(b2[j]);
        for (int i = 0; i < NH; i++) acc += longint'(w2[j*NH+i]) * hid_ref[i];
        out_ref[j] = acc;
      end
      arg_ref = 0;
      for (int j = 1; j < NO; j++) if (out_ref[j] > out_ref[arg_ref]) arg_ref = j;
      $display("image %0d: %0d of %0d hidden values clamped, digit %0d", r, n_clamp, NH, arg_ref);

      bus_write(REG_LOAD_TARGET, 32'(TGT_IMAGE));
      foreach (img[k]) bus_write(REG_LOAD_DATA, {24'd0, img[k]});
      bus_read(REG_LOAD_ADDR, rd);
      check(rd == 32'(NI), "LOAD_ADDR after the image");

      bus_write(REG_CONTROL, 32'h0);
      bus_write(REG_CONTROL, 32'h1);
      n = 0; rd = 0;
      while (!rd[STAT_DONE] && n < 300000) begin
        chipselect = 1; read = 1; address = REG_STATUS;
        @(posedge clk); #1;
        rd = readdata;
        chipselect = 0; read = 0;
        n++;
      end
      check(n == T_INFER + 1, $sformatf("done after %0d cycles, expected %0d", n, T_INFER + 1));
      check(T_INFER > 201663 && T_INFER < 205737, "latency within 1% of 203,700 cycles");

      for (int j = 0; j < NH; j++)
        check(dut.u_mem.u_hidden_mem.mem[j] == 32'(hid_ref[j]),
              $sformatf("hidden[%0d] = %0d, expected %0d", j, dut.u_mem.u_hidden_mem.mem[j], hid_ref[j]));
      for (int j = 0; j < NO; j++)
        check(dut.u_dp.out_regs[j] == 48'(out_ref[j]),
              $sformatf("out[%0d] = %0d, expected %0d", j, dut.u_dp.out_regs[j], out_ref[j]));
      bus_read(REG_RESULT, rd);
      check(rd == 32'(arg_ref), $sformatf("RESULT %0d, expected %0d", rd, arg_ref));
      bus_read(REG_CONFIDENCE, rd);
      check(rd == 32'(out_ref[arg_ref]), "CONFIDENCE");
      check(HEX0 == hex_of(arg_ref), "HEX0");
      bus_write(REG_CONTROL, 32'h4);
      @(posedge clk); #1;
      bus_read(REG_STATUS, rd);
      check(rd == 32'h0, "clear_done");
      n_img++;
    end
    check(n_img == 10, "ten images classified");
    $display("inference: %0d cycles, %0.2f ms at 50 MHz", T_INFER, real'(T_INFER) / 50.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
