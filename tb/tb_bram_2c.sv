// tb_bram_2c: self-checking test of the two-cycle-read memory.
//
// Uses a 10 x 12 instance (not a power of two, so out-of-range addresses
// exist). Fills it, then issues a random read address every cycle, mixed
// with random writes, and compares rdata against a reference array delayed
// by exactly two cycles. Also checks that writes to addresses >= DEPTH are
// dropped and such reads return 0.
module tb_bram_2c;
  localparam int DEPTH = 10;
  localparam int WIDTH = 12;
  localparam int AW    = 4;

  logic             clk = 0;
  logic             we;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  bram_2c #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [WIDTH-1:0] exp_q [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = WIDTH'($urandom);
      we = 1; waddr = AW'(a); wdata = ref_mem[a];
      @(posedge clk); #1;
    end
    we = 0;
    // out-of-range write must not land anywhere
    we = 1; waddr = 4'd12; wdata = '1; @(posedge clk); #1; we = 0;
    // two dummy cycles to prime the read pipeline
    raddr = 0; @(posedge clk); #1; @(posedge clk); #1;
    for (int c = 0; c < 400; c++) begin
      // the value presented two cycles ago must appear now
      if (exp_q.size() == 2) begin
        logic [WIDTH-1:0] e;
        e = exp_q.pop_front();
        checks++;
        if (rdata !== e) begin
          failures++;
          $display("FAIL cycle %0d: rdata=%h expected %h", c, rdata, e);
        end
      end
      raddr = AW'($urandom_range(0, 15));
      // expected value is the memory content at the time the data register
      // samples, one edge after the address register; writes this cycle
      // land at the same edge as the address capture, so they are visible
      we    = ($urandom_range(0, 3) == 0);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = WIDTH'($urandom);
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      exp_q.push_back((raddr < DEPTH) ? ref_mem[raddr] : '0);
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
