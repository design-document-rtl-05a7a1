// mnist_fsm: the sequencer that walks one inference through the memories.
//
// Fifteen states. After a start pulse (accepted only in S_IDLE and only
// while load_mode is 0) it runs, for each FC1 neuron j:
//   NEXT_J     present fc1_b read address j
//   BIAS_WAIT  memory latency cycle
//   BIAS_LOAD  bias arrives, datapath loads it into acc_fc1; present the
//              read of weight/pixel i = 0
//   MAC_WAIT   memory latency cycle
//   MAC        weight and pixel arrive, datapath accumulates; present the
//              read of i + 1; back to MAC_WAIT until i = N_IN - 1
//   STORE      ReLU(acc_fc1) written to hidden_mem[j]
// then the same six states for each FC2 neuron, reading hidden_mem instead
// of img_mem and writing out_regs[j] at STORE, then S_ARGMAX for as long as
// the argmax scan runs (N_OUT cycles), then S_DONE. The sticky done flag is
// set on entry to S_DONE; a clear_done pulse clears it and returns to
// S_IDLE. busy is high in every state except S_IDLE and S_DONE.
//
// Timing: every MAC takes two cycles because each memory read takes two.
// An inference takes NH*(4 + 2*NI) + NO*(4 + 2*NH) + NO cycles from the
// first cycle out of S_IDLE to the first cycle of S_DONE: 203,826 at the
// default sizes. Read addresses are combinational from the state and the
// counters (the memories register them). The states, their order, the two
// cycles per MAC and the loop bounds follow the design description; holding
// S_ARGMAX until the scan reports its last element and the counter widths
// derived from the sizes are this design's own choices.
module mnist_fsm
  import mnist_pkg::*;
#(
  parameter int unsigned NI = N_IN,
  parameter int unsigned NH = N_HID,
  parameter int unsigned NO = N_OUT,
  localparam int unsigned FC1W_AW = $clog2(NH*NI),
  localparam int unsigned FC1B_AW = $clog2(NH),
  localparam int unsigned FC2W_AW = $clog2(NO*NH),
  localparam int unsigned FC2B_AW = $clog2(NO),
  localparam int unsigned IMG_AW  = $clog2(NI),
  localparam int unsigned HID_AW  = $clog2(NH),
  localparam int unsigned J_W     = $clog2((NH > NO) ? NH : NO),
  localparam int unsigned I_W     = $clog2(((NI > NH) ? NI : NH) + 1)
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               start,
  input  logic               load_mode,
  input  logic               clear_done,
  input  logic               argmax_last,
  output state_e             state,
  output logic               busy,
  output logic               done,
  // memory read addresses
  output logic [FC1W_AW-1:0] fc1_w_raddr,
  output logic [FC1B_AW-1:0] fc1_b_raddr,
  output logic [FC2W_AW-1:0] fc2_w_raddr,
  output logic [FC2B_AW-1:0] fc2_b_raddr,
  output logic [IMG_AW-1:0]  img_raddr,
  output logic [HID_AW-1:0]  hid_raddr,
  // hidden_mem write
  output logic               hid_we,
  output logic [HID_AW-1:0]  hid_waddr,
  // datapath controls
  output logic               fc1_bias_load,
  output logic               fc1_mac,
  output logic               fc2_bias_load,
  output logic               fc2_mac,
  output logic               out_we,
  output logic [J_W-1:0]     out_idx,
  output logic               argmax_en,
  output logic               latch_result
);

  state_e         state_q, state_d;
  logic [J_W-1:0] j;
  logic [I_W-1:0] i;
  logic           done_q;

  logic j_last_fc1, j_last_fc2, i_last_fc1, i_last_fc2;
  assign j_last_fc1 = (32'(j) == NH - 1);
  assign j_last_fc2 = (32'(j) == NO - 1);
  assign i_last_fc1 = (32'(i) == NI - 1);
  assign i_last_fc2 = (32'(i) == NH - 1);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:          if (start && !load_mode) state_d = S_FC1_NEXT_J;
      S_FC1_NEXT_J:    state_d = S_FC1_BIAS_WAIT;
      S_FC1_BIAS_WAIT: state_d = S_FC1_BIAS_LOAD;
      S_FC1_BIAS_LOAD: state_d = S_FC1_MAC_WAIT;
      S_FC1_MAC_WAIT:  state_d = S_FC1_MAC;
      S_FC1_MAC:       state_d = i_last_fc1 ? S_FC1_STORE : S_FC1_MAC_WAIT;
      S_FC1_STORE:     state_d = j_last_fc1 ? S_FC2_NEXT_J : S_FC1_NEXT_J;
      S_FC2_NEXT_J:    state_d = S_FC2_BIAS_WAIT;
      S_FC2_BIAS_WAIT: state_d = S_FC2_BIAS_LOAD;
      S_FC2_BIAS_LOAD: state_d = S_FC2_MAC_WAIT;
      S_FC2_MAC_WAIT:  state_d = S_FC2_MAC;
      S_FC2_MAC:       state_d = i_last_fc2 ? S_FC2_STORE : S_FC2_MAC_WAIT;
      S_FC2_STORE:     state_d = j_last_fc2 ? S_ARGMAX : S_FC2_NEXT_J;
      S_ARGMAX:        if (argmax_last) state_d = S_DONE;
      S_DONE:          if (clear_done) state_d = S_IDLE;
      default:         state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= S_IDLE;
      j       <= '0;
      i       <= '0;
      done_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      unique case (state_q)
        S_IDLE: j <= '0;
        S_FC1_BIAS_LOAD, S_FC2_BIAS_LOAD: i <= '0;
        S_FC1_MAC, S_FC2_MAC: i <= i + 1'b1;
        S_FC1_STORE: j <= j_last_fc1 ? '0 : j + 1'b1;
        S_FC2_STORE: j <= j + 1'b1;
        default: ;
      endcase
      if (state_q == S_ARGMAX && argmax_last)
        done_q <= 1'b1;
      else if (clear_done)
        done_q <= 1'b0;
    end
  end

  assign state = state_q;
  assign done  = done_q;
  assign busy  = (state_q != S_IDLE) && (state_q != S_DONE);

  // index whose operands are requested this cycle: 0 from BIAS_LOAD,
  // i + 1 from MAC (the final one, past the end, is never consumed)
  logic [I_W-1:0] rd_i;
  assign rd_i = (state_q == S_FC1_MAC || state_q == S_FC2_MAC) ? i + 1'b1 : '0;

  assign fc1_b_raddr = FC1B_AW'(j);
  assign fc2_b_raddr = FC2B_AW'(j);
  assign fc1_w_raddr = FC1W_AW'(j * NI + rd_i);
  assign img_raddr   = IMG_AW'(rd_i);
  assign fc2_w_raddr = FC2W_AW'(j * NH + rd_i);
  assign hid_raddr   = HID_AW'(rd_i);

  assign hid_we        = (state_q == S_FC1_STORE);
  assign hid_waddr     = HID_AW'(j);
  assign fc1_bias_load = (state_q == S_FC1_BIAS_LOAD);
  assign fc1_mac       = (state_q == S_FC1_MAC);
  assign fc2_bias_load = (state_q == S_FC2_BIAS_LOAD);
  assign fc2_mac       = (state_q == S_FC2_MAC);
  assign out_we        = (state_q == S_FC2_STORE);
  assign out_idx       = j;
  assign argmax_en     = (state_q == S_ARGMAX);
  assign latch_result  = (state_q == S_ARGMAX) && argmax_last;

  a_no_start_when_loading: assert property (@(posedge clk) disable iff (reset)
    (state_q == S_IDLE && load_mode) |=> state_q == S_IDLE);

endmodule
