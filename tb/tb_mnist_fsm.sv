// tb_mnist_fsm: sequencer test at a reduced shape (NI=5, NH=3, NO=4).
// The testbench delays every read address by two cycles, as the memories
// do, and checks that each datapath control sees the operand it needs:
// the bias of neuron j at *_BIAS_LOAD, and weight j*N+i with input i at
// the i-th *_MAC of neuron j, for every i and j; that hidden_mem[j] and
// out_regs[j] are written once per neuron in order; that argmax_en lasts
// until the (modelled) scan reports its last element; and that the whole
// inference takes NH*(4+2*NI) + NO*(4+2*NH) + NO cycles. It also checks
// that start is ignored under load_mode and while busy, that done is sticky
// until clear_done, and that clear_done returns the sequencer to idle.
module tb_mnist_fsm;
  import mnist_pkg::*;
  localparam int NI = 5, NH = 3, NO = 4;

  logic clk = 0, reset, start, load_mode, clear_done, argmax_last;
  state_e state;
  logic busy, done;
  logic [3:0] fc1_w_raddr;
  logic [1:0] fc1_b_raddr;
  logic [3:0] fc2_w_raddr;
  logic [1:0] fc2_b_raddr;
  logic [2:0] img_raddr;
  logic [1:0] hid_raddr;
  logic       hid_we;
  logic [1:0] hid_waddr;
  logic fc1_bias_load, fc1_mac, fc2_bias_load, fc2_mac, out_we, argmax_en, latch_result;
  logic [1:0] out_idx;
  int checks = 0, failures = 0;

  mnist_fsm #(.NI(NI), .NH(NH), .NO(NO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // memory latency model: address seen two edges ago
  int d1 [6], d2 [6];
  always @(posedge clk) begin
    d2 <= d1;
    d1 <= '{int'(fc1_w_raddr), int'(fc1_b_raddr), int'(fc2_w_raddr),
            int'(fc2_b_raddr), int'(img_raddr), int'(hid_raddr)};
  end

  // argmax scan model: last in the NO-th consecutive cycle of argmax_en
  int am_cnt;
  always @(posedge clk) am_cnt <= argmax_en ? am_cnt + 1 : 0;
  assign argmax_last = argmax_en && (am_cnt == NO - 1);

  // expected-operation trackers
  int j1, i1, j2, i2, n_hid_we, n_out_we, n_am;

  always @(negedge clk) if (!reset) begin
    if (fc1_bias_load) begin
      check(d2[1] == j1, $sformatf("fc1 bias addr %0d for j=%0d", d2[1], j1));
      check(i1 == 0, "fc1 bias before MACs");
    end
    if (fc1_mac) begin
      check(d2[0] == j1 * NI + i1 && d2[4] == i1,
            $sformatf("fc1 MAC j=%0d i=%0d got w=%0d x=%0d", j1, i1, d2[0], d2[4]));
      i1++;
    end
    if (hid_we) begin
      check(i1 == NI && hid_waddr == 2'(j1), $sformatf("hidden store j=%0d after %0d MACs", j1, i1));
      n_hid_we++; j1++; i1 = 0;
    end
    if (fc2_bias_load) begin
      check(j1 == NH, "FC2 starts after all FC1 neurons");
      check(d2[3] == j2, $sformatf("fc2 bias addr %0d for j=%0d", d2[3], j2));
    end
    if (fc2_mac) begin
      check(d2[2] == j2 * NH + i2 && d2[5] == i2,
            $sformatf("fc2 MAC j=%0d i=%0d got w=%0d h=%0d", j2, i2, d2[2], d2[5]));
      i2++;
    end
    if (out_we) begin
      check(i2 == NH && out_idx == 2'(j2), $sformatf("out store j=%0d after %0d MACs", j2, i2));
      n_out_we++; j2++; i2 = 0;
    end
    if (argmax_en) begin
      check(j2 == NO, "argmax after all FC2 neurons");
      n_am++;
    end
    check(!(fc1_mac && fc2_mac), "multipliers never both active");
  end

  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #1 s = 0;
  endtask

  int cyc;

  initial begin
    reset = 1; start = 0; load_mode = 0; clear_done = 0;
    j1 = 0; i1 = 0; j2 = 0; i2 = 0; n_hid_we = 0; n_out_we = 0; n_am = 0;
    repeat (2) @(posedge clk); #1 reset = 0;
    check(state == S_IDLE && !busy && !done, "idle after reset");

    // start under load_mode is ignored
    load_mode = 1; pulse(start); load_mode = 0;
    repeat (3) @(posedge clk); #1;
    check(state == S_IDLE && !busy, "start ignored under load_mode");

    pulse(start);
    cyc = 0;
    while (state != S_DONE && cyc < 10000) begin
      if (cyc == 20) begin
        // a second start while busy must change nothing
        start = 1;
      end
      if (cyc == 21) start = 0;
      check(busy, "busy while running");
      @(posedge clk); #1; cyc++;
    end
    check(cyc == NH * (4 + 2 * NI) + NO * (4 + 2 * NH) + NO,
          $sformatf("inference took %0d cycles, expected %0d", cyc,
                    NH * (4 + 2 * NI) + NO * (4 + 2 * NH) + NO));
    check(n_hid_we == NH && n_out_we == NO && n_am == NO, "operation counts");
    check(done && !busy, "done and not busy in S_DONE");
    repeat (5) @(posedge clk); #1;
    check(done && state == S_DONE, "done sticky");
    pulse(start);
    #1 check(state == S_DONE, "start ignored in S_DONE");
    pulse(clear_done);
    check(!done && state == S_IDLE, "clear_done returns to idle");

    // a second full inference also works
    j1 = 0; i1 = 0; j2 = 0; i2 = 0; n_hid_we = 0; n_out_we = 0; n_am = 0;
    pulse(start);
    cyc = 0;
    while (!done && cyc < 10000) begin @(posedge clk); #1; cyc++; end
    check(n_hid_we == NH && n_out_we == NO && n_am == NO, "second inference counts");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
