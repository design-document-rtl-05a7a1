// mnist_accel: Avalon-MM peripheral that classifies one 28x28 MNIST digit
// with an INT8 multi-layer perceptron (784 -> 128 ReLU -> 10 -> argmax).
//
// The host first streams the network and the image into the on-chip
// memories through the LOAD registers (load_mode = 1), then clears load_mode
// and writes CONTROL.start. The sequencer (mnist_fsm) then runs every
// multiply-accumulate one after another on a single 8x8 multiplier (FC1) and
// a single 32x8 multiplier (FC2), two clock cycles per MAC because each
// memory read takes two cycles, and finally scans the ten outputs for the
// largest. When STATUS.done rises, RESULT holds the predicted digit and
// CONFIDENCE the low 32 bits of the winning output; CONTROL.clear_done
// returns the peripheral to idle. HEX0 shows RESULT through an active-low
// seven-segment decoder; HEX1..HEX5 are blank (7'h7f).
//
// Interface: Avalon-MM slave with word address[3:0], 32-bit data,
// chipselect/read/write, zero wait states, combinational readdata;
// synchronous active-high reset. An inference takes
// NH*(4 + 2*NI) + NO*(4 + 2*NH) + NO cycles after the start pulse reaches
// the sequencer (203,826 cycles, about 4.1 ms at 50 MHz, at the default
// sizes); the start pulse reaches it one cycle after the CONTROL write.
//
// The structure (register file, 15-state sequencer, six memories with
// two-cycle reads, MAC datapath with ReLU and argmax, HEX decoder) follows
// the design description. AUTO_START adds the optional one-shot start
// counter used when the memories are preloaded at configuration; it is off
// by default, as the host-driven flow is the main one. The sizes are
// parameters so the design can be simulated small.
module mnist_accel
  import mnist_pkg::*;
#(
  parameter int unsigned NI         = N_IN,
  parameter int unsigned NH         = N_HID,
  parameter int unsigned NO         = N_OUT,
  parameter bit          AUTO_START = 1'b0,
  parameter int unsigned AUTO_CNT_W = 16
) (
  input  logic        clk,
  input  logic        reset,
  // Avalon-MM slave
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [3:0]  address,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  // seven-segment displays, active low
  output logic [6:0]  HEX0,
  output logic [6:0]  HEX1,
  output logic [6:0]  HEX2,
  output logic [6:0]  HEX3,
  output logic [6:0]  HEX4,
  output logic [6:0]  HEX5
);

  localparam int unsigned FC1W_AW = $clog2(NH*NI);
  localparam int unsigned FC1B_AW = $clog2(NH);
  localparam int unsigned FC2W_AW = $clog2(NO*NH);
  localparam int unsigned FC2B_AW = $clog2(NO);
  localparam int unsigned IMG_AW  = $clog2(NI);
  localparam int unsigned HID_AW  = $clog2(NH);
  localparam int unsigned J_W     = $clog2((NH > NO) ? NH : NO);

  // register file <-> sequencer / datapath
  logic        start_pulse, load_mode, clear_done_pulse;
  logic        busy, done;
  logic [3:0]  result;
  logic [31:0] confidence;
  load_wr_t    load;

  // sequencer -> memories / datapath

  logic [FC1W_AW-1:0] fc1_w_raddr;
  logic [FC1B_AW-1:0] fc1_b_raddr;
  logic [FC2W_AW-1:0] fc2_w_raddr;
  logic [FC2B_AW-1:0] fc2_b_raddr;
  logic [IMG_AW-1:0]  img_raddr;
  logic [HID_AW-1:0]  hid_raddr;
  logic               hid_we;
  logic [HID_AW-1:0]  hid_waddr;
  logic               fc1_bias_load, fc1_mac, fc2_bias_load, fc2_mac;
  logic               out_we, argmax_en, latch_result, argmax_last;
  logic [J_W-1:0]     out_idx;

  // memories -> datapath
  logic [7:0]  fc1_w_rdata, fc2_w_rdata, img_rdata;
  logic [31:0] fc1_b_rdata, fc2_b_rdata, hid_rdata, hid_wdata;

  logic auto_pulse, start;

  mnist_regfile u_regs (
    .clk, .reset, .chipselect, .read, .write, .address, .writedata, .readdata,
    .busy, .done, .result, .confidence,
    .start_pulse, .load_mode, .clear_done_pulse, .load);

  generate
    if (AUTO_START) begin : g_auto
      auto_start #(.CNT_W(AUTO_CNT_W)) u_auto (
        .clk, .reset, .load_mode, .pulse(auto_pulse));
    end else begin : g_no_auto
      assign auto_pulse = 1'b0;
    end
  endgenerate

  assign start = start_pulse || auto_pulse;

  mnist_fsm #(.NI(NI), .NH(NH), .NO(NO)) u_fsm (
    .clk, .reset, .start, .load_mode, .clear_done(clear_done_pulse), .argmax_last,
    .state(), .busy, .done,
    .fc1_w_raddr, .fc1_b_raddr, .fc2_w_raddr, .fc2_b_raddr, .img_raddr, .hid_raddr,
    .hid_we, .hid_waddr,
    .fc1_bias_load, .fc1_mac, .fc2_bias_load, .fc2_mac,
    .out_we, .out_idx, .argmax_en, .latch_result);

  mnist_bram_bank #(.NI(NI), .NH(NH), .NO(NO)) u_mem (
    .clk, .load,
    .fc1_w_raddr, .fc1_b_raddr, .fc2_w_raddr, .fc2_b_raddr, .img_raddr, .hid_raddr,
    .hid_we, .hid_waddr, .hid_wdata,
    .fc1_w_rdata, .fc1_b_rdata, .fc2_w_rdata, .fc2_b_rdata, .img_rdata, .hid_rdata);

  mnist_datapath #(.NO(NO)) u_dp (
    .clk, .reset,
    .fc1_w_rdata, .img_rdata, .fc1_b_rdata, .fc2_w_rdata, .hid_rdata, .fc2_b_rdata,
    .fc1_bias_load, .fc1_mac, .fc2_bias_load, .fc2_mac,
    .out_we, .out_idx, .argmax_en, .latch_result,
    .hid_wdata, .argmax_last, .result, .confidence);

  hex7seg u_hex0 (.digit(result), .seg(HEX0));

  assign HEX1 = 7'h7f;
  assign HEX2 = 7'h7f;
  assign HEX3 = 7'h7f;
  assign HEX4 = 7'h7f;
  assign HEX5 = 7'h7f;

endmodule
