// mnist_datapath: the arithmetic of the accelerator.
//
// FC1 phase: fc1_bias_load loads the INT32 bias into acc_fc1; each fc1_mac
// adds the signed 8x8 product of the weight and pixel read data (16 bits,
// sign-extended to 32). hid_wdata is ReLU(acc_fc1) = max(0, acc_fc1), the
// value the controller writes to hidden_mem at FC1_STORE.
// FC2 phase: fc2_bias_load loads the INT32 bias, sign-extended, into the
// 48-bit acc_fc2; each fc2_mac adds the signed 32x8 product of a hidden
// activation and a weight (40 bits, sign-extended to 48). out_we stores
// acc_fc2 into out_regs[out_idx], a bank of N_OUT flip-flop registers.
// Argmax: while argmax_en is high an argmax_scan walks out_regs; in its last
// cycle latch_result captures the winning index into result and the low 32
// bits of the winning accumulator into confidence. Both hold until the next
// capture.
// Every operation happens at the clock edge ending the cycle its control is
// high. The two multipliers, the widths and the ReLU placement follow the
// design description; arithmetic wraps silently (the description bounds the
// sums well inside both accumulators).
module mnist_datapath
  import mnist_pkg::*;
#(
  parameter int unsigned NO = N_OUT,
  localparam int unsigned J_W   = $clog2((N_HID > NO) ? N_HID : NO),
  localparam int unsigned IDX_W = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic                     clk,
  input  logic                     reset,
  // memory read data
  input  logic [7:0]               fc1_w_rdata,
  input  logic [7:0]               img_rdata,
  input  logic [31:0]              fc1_b_rdata,
  input  logic [7:0]               fc2_w_rdata,
  input  logic [31:0]              hid_rdata,
  input  logic [31:0]              fc2_b_rdata,
  // controls from the sequencer
  input  logic                     fc1_bias_load,
  input  logic                     fc1_mac,
  input  logic                     fc2_bias_load,
  input  logic                     fc2_mac,
  input  logic                     out_we,
  input  logic [J_W-1:0]           out_idx,
  input  logic                     argmax_en,
  input  logic                     latch_result,
  // results
  output logic [31:0]              hid_wdata,
  output logic                     argmax_last,
  output logic [3:0]               result,
  output logic [31:0]              confidence
);

  logic signed [ACC1_W-1:0] acc_fc1;
  logic signed [ACC2_W-1:0] acc_fc2;
  logic signed [ACC2_W-1:0] out_regs [NO];

  // FC1: signed 8x8 -> 16, sign-extended to 32
  logic signed [15:0] prod1;
  assign prod1 = $signed(fc1_w_rdata) * $signed(img_rdata);

  // FC2: signed 32x8 -> 40, sign-extended to 48
  logic signed [39:0] prod2;
  assign prod2 = $signed(hid_rdata) * $signed(fc2_w_rdata);

  always_ff @(posedge clk) begin
    if (reset) begin
      acc_fc1 <= '0;
      acc_fc2 <= '0;
    end else begin
      if (fc1_bias_load)
        acc_fc1 <= $signed(fc1_b_rdata);
      else if (fc1_mac)
        acc_fc1 <= acc_fc1 + ACC1_W'(prod1);
      if (fc2_bias_load)
        acc_fc2 <= ACC2_W'($signed(fc2_b_rdata));
      else if (fc2_mac)
        acc_fc2 <= acc_fc2 + ACC2_W'(prod2);
    end
  end

  // ReLU feeding the hidden_mem write port
  assign hid_wdata = acc_fc1[ACC1_W-1] ? '0 : acc_fc1;

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int n = 0; n < int'(NO); n++)
        out_regs[n] <= '0;
    end else if (out_we && 32'(out_idx) < NO) begin
      out_regs[IDX_W'(out_idx)] <= acc_fc2;
    end
  end

  logic [IDX_W-1:0]         am_idx;
  logic signed [ACC2_W-1:0] am_best;

  argmax_scan #(.N(NO), .W(ACC2_W)) u_argmax (
    .clk, .reset, .en(argmax_en), .vals(out_regs),
    .last(argmax_last), .idx_next(am_idx), .best_next(am_best));

  always_ff @(posedge clk) begin
    if (reset) begin
      result     <= '0;
      confidence <= '0;
    end else if (latch_result) begin
      result     <= 4'(am_idx);
      confidence <= am_best[31:0];
    end
  end

endmodule
