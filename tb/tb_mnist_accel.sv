// tb_mnist_accel: end-to-end test of the peripheral through its Avalon-MM
// port at a reduced network shape (16 inputs, 8 hidden, 10 outputs).
//
// The testbench plays the host driver: it enters load mode, streams random
// weights, biases and images into the five memories (junk in the unused
// upper bits of INT8 writes), leaves load mode, starts an inference, polls
// STATUS.done, reads RESULT and CONFIDENCE and clears done. A reference
// forward pass in 64-bit integers gives every hidden activation, every FC2
// output, the argmax and the cycle count the design must reproduce; the
// hidden memory and out_regs are compared through the hierarchy.
//
// Mechanisms exercised, each counted and required at least once: loads to
// each of the five targets, a write to a reserved target, a direct
// LOAD_ADDR write (single-pixel patch), start ignored under load_mode,
// start ignored while busy, ReLU clamping and passing, an argmax tie (first
// index wins), done staying set until clear_done, HEX0 showing the digit,
// back-to-back inferences with only the image reloaded, and the optional
// auto-start pulse (a second instance with a 10-bit counter).
module tb_mnist_accel;
  import mnist_pkg::*;
  localparam int NI = 16, NH = 8, NO = 10;
  localparam int T_INFER = NH * (4 + 2 * NI) + NO * (4 + 2 * NH) + NO;

  logic        clk = 0, reset;
  logic        chipselect, read, write;
  logic [3:0]  address;
  logic [31:0] writedata, readdata;
  logic [6:0]  HEX0, HEX1, HEX2, HEX3, HEX4, HEX5;
  int checks = 0, failures = 0;

  mnist_accel #(.NI(NI), .NH(NH), .NO(NO)) dut (.*);

  // second instance: auto-start enabled, never touched by the host
  logic [31:0] rd_auto;
  logic [6:0]  hx [6];
  mnist_accel #(.NI(NI), .NH(NH), .NO(NO), .AUTO_START(1'b1), .AUTO_CNT_W(10)) dut_auto (
    .clk, .reset, .chipselect(1'b1), .read(1'b1), .write(1'b0), .address(4'(REG_STATUS)),
    .writedata(32'd0), .readdata(rd_auto),
    .HEX0(hx[0]), .HEX1(hx[1]), .HEX2(hx[2]), .HEX3(hx[3]), .HEX4(hx[4]), .HEX5(hx[5]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_load [5];
  int m_reserved, m_addr_patch, m_start_in_load, m_start_busy, m_relu_clamp, m_relu_pass;
  int m_tie, m_done_sticky, m_hex, m_back_to_back, m_auto;

  // network and image
  byte         w1 [NH*NI];
  int          b1 [NH];
  byte         w2 [NO*NH];
  int          b2 [NO];
  byte         img [NI];

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

  function automatic logic [31:0] byte_word(input byte b);
    return {8'($urandom), 8'($urandom), 8'($urandom), b};  // upper bits are junk
  endfunction

  task automatic load_target(input int t);
    bus_write(REG_LOAD_TARGET, 32'(t));
    case (t)
      0: foreach (w1[k])  bus_write(REG_LOAD_DATA, byte_word(w1[k]));
      1: foreach (b1[k])  bus_write(REG_LOAD_DATA, b1[k]);
      2: foreach (w2[k])  bus_write(REG_LOAD_DATA, byte_word(w2[k]));
      3: foreach (b2[k])  bus_write(REG_LOAD_DATA, b2[k]);
      default: foreach (img[k]) bus_write(REG_LOAD_DATA, byte_word(img[k]));
    endcase
    m_load[t]++;
  endtask

  task automatic random_net();
    foreach (w1[k]) w1[k] = byte'($urandom);
    foreach (b1[k]) b1[k] = int'($urandom_range(0, 60000)) - 30000;
    foreach (w2[k]) w2[k] = byte'($urandom);
    foreach (b2[k]) b2[k] = int'($urandom_range(0, 2000000)) - 1000000;
  endtask

  task automatic random_image();
    foreach (img[k]) img[k] = byte'($urandom_range(0, 255) - 128);
  endtask

  // reference forward pass
  longint hid_ref [NH];
  longint out_ref [NO];
  int     arg_ref;

  task automatic golden();
    for (int j = 0; j < NH; j++) begin
      longint acc = longint'(b1[j]);
      for (int i = 0; i < NI; i++) acc += longint'(w1[j*NI+i]) * longint'(img[i]);
      if (acc < 0) m_relu_clamp++; else m_relu_pass++;
      hid_ref[j] = (acc < 0) ? 0 : acc;
    end
    for (int j = 0; j < NO; j++) begin
      longint acc = longint'(b2[j]);
      for (int i = 0; i < NH; i++) acc += longint'(w2[j*NH+i]) * hid_ref[i];
      out_ref[j] = acc;
    end
    arg_ref = 0;
    for (int j = 1; j < NO; j++) if (out_ref[j] > out_ref[arg_ref]) arg_ref = j;
  endtask

  // segments lit per digit, letters a..g
  string glyph [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                        "abc", "abcdefg", "abcdfg"};
  function automatic logic [6:0] hex_of(input int d);
    logic [6:0] s = 7'h7f;
    foreach (glyph[d][k]) s[glyph[d][k] - "a"] = 1'b0;
    return s;
  endfunction

  // run one inference, compare everything; optionally poke start mid-run
  task automatic infer_and_check(input bit poke_busy);
    logic [31:0] rd;
    int n;
    golden();
    bus_write(REG_CONTROL, 32'h0);          // leave load mode
    bus_write(REG_CONTROL, 32'h1);          // start
    n = 0;
    rd = 0;
    while (!rd[STAT_DONE] && n < 100000) begin
      if (poke_busy && n == 50) begin
        bus_read(REG_STATUS, rd);
        check(rd[STAT_BUSY], "busy mid-run");
        bus_write(REG_CONTROL, 32'h1);      // must be ignored
        m_start_busy++;
        n += 2;
      end
      chipselect = 1; read = 1; address = REG_STATUS;
      @(posedge clk); #1;
      rd = readdata;
      chipselect = 0; read = 0;
      n++;
    end
    // done seen after the one cycle the start pulse takes plus the inference
    check(n == T_INFER + 1, $sformatf("done after %0d cycles, expected %0d", n, T_INFER + 1));
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
    check(HEX0 == hex_of(arg_ref), "HEX0 shows the digit");
    check({HEX1, HEX2, HEX3, HEX4, HEX5} == {5{7'h7f}}, "HEX1..5 blank");
    m_hex++;
    // done is sticky until clear_done
    repeat (5) @(posedge clk);
    #1 bus_read(REG_STATUS, rd);
    check(rd == 32'h2, "done sticky, not busy");
    m_done_sticky++;
    bus_write(REG_CONTROL, 32'h4);
    @(posedge clk); #1;                     // the pulse acts one cycle later
    bus_read(REG_STATUS, rd);
    check(rd == 32'h0, "clear_done clears done");
    bus_read(REG_RESULT, rd);
    check(rd == 32'(arg_ref), "RESULT stays after clear_done");
  endtask

  logic [31:0] rd;

  initial begin
    reset = 1; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0;
    foreach (m_load[t]) m_load[t] = 0;
    {m_reserved, m_addr_patch, m_start_in_load, m_start_busy, m_relu_clamp, m_relu_pass} = '0;
    {m_tie, m_done_sticky, m_hex, m_back_to_back, m_auto} = '0;
    repeat (3) @(posedge clk); #1 reset = 0;

    bus_read(REG_VERSION, rd);
    check(rd == 32'h4D4E5301, "VERSION");

    // load everything
    random_net();
    random_image();
    bus_write(REG_CONTROL, 32'h2);
    for (int t = 0; t < 5; t++) load_target(t);

    // reserved target: must not disturb any memory
    bus_write(REG_LOAD_TARGET, 32'd5);
    repeat (4) bus_write(REG_LOAD_DATA, 32'hFFFF_FFFF);
    m_reserved++;

    // start while in load mode (CONTROL = start | load_mode) is ignored
    bus_write(REG_CONTROL, 32'h3);
    repeat (3) @(posedge clk);
    #1 bus_read(REG_STATUS, rd);
    check(rd == 32'h0, "start ignored under load_mode");
    m_start_in_load++;

    infer_and_check(1'b1);

    // patch one pixel through LOAD_ADDR, rerun
    bus_write(REG_CONTROL, 32'h2);
    bus_write(REG_LOAD_TARGET, 32'd4);
    bus_write(REG_LOAD_ADDR, 32'd5);
    img[5] = -img[5] - 8'sd1;
    bus_write(REG_LOAD_DATA, byte_word(img[5]));
    m_addr_patch++;
    infer_and_check(1'b0);

    // back-to-back images, only the image reloaded
    for (int r = 0; r < 3; r++) begin
      random_image();
      bus_write(REG_CONTROL, 32'h2);
      load_target(4);
      infer_and_check(1'b0);
      m_back_to_back++;
    end

    // argmax tie: outputs 3 and 7 identical and largest
    for (int i = 0; i < NH; i++) w2[7*NH+i] = w2[3*NH+i];
    b2[3] = 32'sd1 << 30; b2[7] = 32'sd1 << 30;
    bus_write(REG_CONTROL, 32'h2);
    load_target(2);
    load_target(3);
    infer_and_check(1'b0);
    check(arg_ref == 3 && out_ref[3] == out_ref[7], "tie constructed");
    m_tie++;

    // the auto-start instance ran by itself (pulse at cycle 1023)
    check(rd_auto[STAT_DONE] == 1'b1, "auto-start instance finished");
    if (rd_auto[STAT_DONE]) m_auto++;

    check(m_load[0] > 0, "mechanism: FC1_W load");
    check(m_load[1] > 0, "mechanism: FC1_B load");
    check(m_load[2] > 0, "mechanism: FC2_W load");
    check(m_load[3] > 0, "mechanism: FC2_B load");
    check(m_load[4] > 0, "mechanism: IMAGE load");
    check(m_reserved > 0, "mechanism: reserved target");
    check(m_addr_patch > 0, "mechanism: LOAD_ADDR write");
    check(m_start_in_load > 0, "mechanism: start under load_mode");
    check(m_start_busy > 0, "mechanism: start while busy");
    check(m_relu_clamp > 0, "mechanism: ReLU clamp");
    check(m_relu_pass > 0, "mechanism: ReLU pass");
    check(m_tie > 0, "mechanism: argmax tie");
    check(m_done_sticky > 0, "mechanism: sticky done / clear_done");
    check(m_hex > 0, "mechanism: HEX0");
    check(m_back_to_back > 0, "mechanism: back-to-back inferences");
    check(m_auto > 0, "mechanism: auto-start");
    $display("mechanisms: loads %0d/%0d/%0d/%0d/%0d reserved %0d addr_patch %0d start_in_load %0d start_busy %0d relu_clamp %0d relu_pass %0d tie %0d done_sticky %0d hex %0d back_to_back %0d auto %0d",
             m_load[0], m_load[1], m_load[2], m_load[3], m_load[4], m_reserved, m_addr_patch,
             m_start_in_load, m_start_busy, m_relu_clamp, m_relu_pass, m_tie, m_done_sticky,
             m_hex, m_back_to_back, m_auto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
