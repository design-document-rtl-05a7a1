// tb_mnist_bram_bank: memory bank test at a reduced shape (NI=6, NH=4,
// NO=3). Loads every loadable memory through the load bundle with random
// words (INT8 targets take only the low byte), writes hidden_mem through its
// own port, then reads every word of every memory back through the read
// ports, checking each two cycles after its address. Also checks that
// reserved target codes and out-of-range indices write nothing.
module tb_mnist_bram_bank;
  import mnist_pkg::*;
  localparam int NI = 6, NH = 4, NO = 3;

  logic        clk = 0;
  load_wr_t    load;
  logic [4:0]  fc1_w_raddr;
  logic [1:0]  fc1_b_raddr;
  logic [3:0]  fc2_w_raddr;
  logic [1:0]  fc2_b_raddr;
  logic [2:0]  img_raddr;
  logic [1:0]  hid_raddr;
  logic        hid_we;
  logic [1:0]  hid_waddr;
  logic [31:0] hid_wdata;
  logic [7:0]  fc1_w_rdata, fc2_w_rdata, img_rdata;
  logic [31:0] fc1_b_rdata, fc2_b_rdata, hid_rdata;
  int checks = 0, failures = 0;

  mnist_bram_bank #(.NI(NI), .NH(NH), .NO(NO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference contents, indexed [target][addr]; target 5 = hidden
  int unsigned depth [6] = '{NH*NI, NH, NO*NH, NO, NI, NH};
  logic [31:0] ref_mem [6][32];

  task automatic load_word(input int t, input int a, input logic [31:0] d);
    load.we = 1; load.target = 3'(t); load.addr = 17'(a); load.data = d;
    @(posedge clk); #1;
    load.we = 0;
  endtask

  task automatic read_all(input int a);
    fc1_w_raddr = 5'(a); fc1_b_raddr = 2'(a); fc2_w_raddr = 4'(a);
    fc2_b_raddr = 2'(a); img_raddr = 3'(a); hid_raddr = 2'(a);
    @(posedge clk); #1;
    fc1_w_raddr = '1; fc1_b_raddr = '1; fc2_w_raddr = '1;  // later addresses must not matter
    @(posedge clk); #1;
    if (a < NH*NI) begin checks++; if (fc1_w_rdata !== ref_mem[0][a][7:0]) begin failures++; $display("FAIL fc1_w[%0d]", a); end end
    if (a < NH)    begin checks++; if (fc1_b_rdata !== ref_mem[1][a])      begin failures++; $display("FAIL fc1_b[%0d]", a); end end
    if (a < NO*NH) begin checks++; if (fc2_w_rdata !== ref_mem[2][a][7:0]) begin failures++; $display("FAIL fc2_w[%0d]", a); end end
    if (a < NO)    begin checks++; if (fc2_b_rdata !== ref_mem[3][a])      begin failures++; $display("FAIL fc2_b[%0d]", a); end end
    if (a < NI)    begin checks++; if (img_rdata   !== ref_mem[4][a][7:0]) begin failures++; $display("FAIL img[%0d]", a); end end
    if (a < NH)    begin checks++; if (hid_rdata   !== ref_mem[5][a])      begin failures++; $display("FAIL hid[%0d]", a); end end
  endtask

  initial begin
    load = '0; hid_we = 0; hid_waddr = 0; hid_wdata = 0;
    fc1_w_raddr = 0; fc1_b_raddr = 0; fc2_w_raddr = 0; fc2_b_raddr = 0;
    img_raddr = 0; hid_raddr = 0;
    for (int t = 0; t < 5; t++)
      for (int a = 0; a < int'(depth[t]); a++) begin
        ref_mem[t][a] = $urandom;
        load_word(t, a, ref_mem[t][a]);
      end
    for (int a = 0; a < NH; a++) begin
      ref_mem[5][a] = $urandom;
      hid_we = 1; hid_waddr = 2'(a); hid_wdata = ref_mem[5][a];
      @(posedge clk); #1;
    end
    hid_we = 0;
    // writes that must land nowhere
    for (int t = 5; t < 8; t++) load_word(t, 0, 32'hFFFF_FFFF);
    load_word(1, 4 + 32, 32'hFFFF_FFFF);   // beyond fc1_b, aliases to 0 if unchecked
    load_word(3, 3, 32'hFFFF_FFFF);        // fc2_b has 3 words
    load_word(4, 8 + 1, 32'hFFFF_FFFF);    // beyond img
    for (int a = 0; a < NH*NI; a++) read_all(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
