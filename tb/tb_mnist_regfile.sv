// tb_mnist_regfile: Avalon-MM register file test.
// Checks the VERSION constant, STATUS/RESULT/CONFIDENCE read-back, that
// write-only registers read 0, that start and clear_done are one-cycle
// pulses in the cycle after the CONTROL write, that load_mode holds, that
// writing LOAD_TARGET zeroes LOAD_ADDR, that back-to-back LOAD_DATA writes
// each produce one memory write at LOAD_ADDR K, K+1, ... in the same cycle
// (one per clock) and that LOAD_DATA is ignored outside load mode.
module tb_mnist_regfile;
  import mnist_pkg::*;
  logic        clk = 0, reset;
  logic        chipselect, read, write;
  logic [3:0]  address;
  logic [31:0] writedata, readdata;
  logic        busy, done;
  logic [3:0]  result;
  logic [31:0] confidence;
  logic        start_pulse, load_mode, clear_done_pulse;
  load_wr_t    load;
  int checks = 0, failures = 0;

  mnist_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [31:0] d);
    chipselect = 1; write = 1; address = a; writedata = d;
    @(posedge clk); #1;
    chipselect = 0; write = 0;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    chipselect = 1; read = 1; address = a;
    #1 d = readdata;
    @(posedge clk); #1;
    chipselect = 0; read = 0;
  endtask

  logic [31:0] rd;

  initial begin
    reset = 1; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0;
    busy = 0; done = 0; result = 0; confidence = 0;
    @(posedge clk); #1 reset = 0;

    bus_read(REG_VERSION, rd);
    check(rd == 32'h4D4E5301, "VERSION");

    busy = 1; done = 0;
    bus_read(REG_STATUS, rd);  check(rd == 32'h1, "STATUS busy");
    busy = 0; done = 1;
    bus_read(REG_STATUS, rd);  check(rd == 32'h2, "STATUS done");
    result = 4'd7; confidence = 32'hDEAD_BEEF;
    bus_read(REG_RESULT, rd);     check(rd == 32'd7, "RESULT");
    bus_read(REG_CONFIDENCE, rd); check(rd == 32'hDEAD_BEEF, "CONFIDENCE");
    bus_read(REG_CONTROL, rd);    check(rd == 0, "CONTROL reads 0");
    bus_read(REG_LOAD_DATA, rd);  check(rd == 0, "LOAD_DATA reads 0");

    // start pulse: high exactly in the cycle after the write
    check(!start_pulse, "start low before write");
    chipselect = 1; write = 1; address = REG_CONTROL; writedata = 32'h1;
    @(posedge clk); #1 chipselect = 0; write = 0;
    check(start_pulse, "start pulse after write");
    check(!load_mode, "load_mode clear with CONTROL=1");
    @(posedge clk); #1;
    check(!start_pulse, "start self-clears");

    // clear_done pulse
    bus_write(REG_CONTROL, 32'h4);
    check(clear_done_pulse && !start_pulse, "clear_done pulse");
    @(posedge clk); #1;
    check(!clear_done_pulse, "clear_done self-clears");

    // LOAD_DATA outside load mode is ignored
    bus_write(REG_LOAD_ADDR, 32'd5);
    chipselect = 1; write = 1; address = REG_LOAD_DATA; writedata = 32'h11;
    #1 check(!load.we, "no load write outside load mode");
    @(posedge clk); #1 chipselect = 0; write = 0;
    bus_read(REG_LOAD_ADDR, rd); check(rd == 32'd5, "LOAD_ADDR unchanged outside load mode");

    // enter load mode, hold it
    bus_write(REG_CONTROL, 32'h2);
    check(load_mode, "load_mode set");
    repeat (3) @(posedge clk);
    #1 check(load_mode, "load_mode sticky");

    // LOAD_TARGET resets LOAD_ADDR
    bus_write(REG_LOAD_TARGET, 32'd2);
    bus_read(REG_LOAD_ADDR, rd); check(rd == 0, "LOAD_TARGET zeroes LOAD_ADDR");

    // four back-to-back writes: one memory write per clock at K..K+3
    bus_write(REG_LOAD_ADDR, 32'd1000);
    chipselect = 1; write = 1; address = REG_LOAD_DATA;
    for (int k = 0; k < 4; k++) begin
      writedata = 32'h100 + 32'(k);
      #1;
      check(load.we && load.target == 3'd2 && load.addr == 17'(1000 + k)
            && load.data == 32'h100 + 32'(k), $sformatf("burst write %0d", k));
      @(posedge clk); #1;
    end
    chipselect = 0; write = 0;
    #1 check(!load.we, "no write after burst");
    bus_read(REG_LOAD_ADDR, rd); check(rd == 32'd1004, "LOAD_ADDR after burst");

    // reserved target still advances the index
    bus_write(REG_LOAD_TARGET, 32'd6);
    bus_write(REG_LOAD_DATA, 32'h5A);
    bus_read(REG_LOAD_ADDR, rd); check(rd == 32'd1, "LOAD_ADDR advances for reserved target");

    // leaving load mode
    bus_write(REG_CONTROL, 32'h0);
    check(!load_mode, "load_mode cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
