// mnist_bram_bank: the six on-chip memories of the accelerator.
//
//   fc1_w_mem  N_HID*N_IN x 8   FC1 weights, W1[j,i] at j*N_IN + i
//   fc1_b_mem  N_HID x 32       FC1 biases (pre-scaled INT32)
//   fc2_w_mem  N_OUT*N_HID x 8  FC2 weights, W2[j,i] at j*N_HID + i
//   fc2_b_mem  N_OUT x 32       FC2 biases (pre-scaled INT32)
//   img_mem    N_IN x 8         input image (pixel - 128, signed INT8)
//   hidden_mem N_HID x 32       post-ReLU FC1 activations
//
// Each is a bram_2c, so every read port returns data two cycles after its
// address. The five input-side memories are written only by the load path
// from the register file: the load bundle's target code picks the memory,
// its address is the target-local index, and INT8 memories take data[7:0]
// while INT32 memories take data[31:0]. Reserved target codes (5..7) write
// nothing. hidden_mem is written only by the controller (at FC1_STORE).
// Read addresses all come from the controller. Shapes and the target codes
// follow the design description; dropping out-of-range load addresses is
// this design's own choice.
module mnist_bram_bank
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
  localparam int unsigned HID_AW  = $clog2(NH)
) (
  input  logic               clk,
  // load path (from the register file)
  input  load_wr_t           load,
  // read addresses (from the controller)
  input  logic [FC1W_AW-1:0] fc1_w_raddr,
  input  logic [FC1B_AW-1:0] fc1_b_raddr,
  input  logic [FC2W_AW-1:0] fc2_w_raddr,
  input  logic [FC2B_AW-1:0] fc2_b_raddr,
  input  logic [IMG_AW-1:0]  img_raddr,
  input  logic [HID_AW-1:0]  hid_raddr,
  // hidden_mem write port (from the controller and datapath)
  input  logic               hid_we,
  input  logic [HID_AW-1:0]  hid_waddr,
  input  logic [31:0]        hid_wdata,
  // read data (to the datapath)
  output logic [7:0]         fc1_w_rdata,
  output logic [31:0]        fc1_b_rdata,
  output logic [7:0]         fc2_w_rdata,
  output logic [31:0]        fc2_b_rdata,
  output logic [7:0]         img_rdata,
  output logic [31:0]        hid_rdata
);

  logic we_fc1_w, we_fc1_b, we_fc2_w, we_fc2_b, we_img;

  always_comb begin
    we_fc1_w = 1'b0;
    we_fc1_b = 1'b0;
    we_fc2_w = 1'b0;
    we_fc2_b = 1'b0;
    we_img   = 1'b0;
    if (load.we) begin
      unique case (load.target)
        TGT_FC1_W: we_fc1_w = 1'b1;
        TGT_FC1_B: we_fc1_b = 1'b1;
        TGT_FC2_W: we_fc2_w = 1'b1;
        TGT_FC2_B: we_fc2_b = 1'b1;
        TGT_IMAGE: we_img   = 1'b1;
        default:   ;  // reserved codes write nothing
      endcase
    end
  end

  // A load index beyond a memory's address width must not alias onto a
  // lower word, so the upper index bits are checked here; bram_2c drops
  // indices between DEPTH and 2**AW.
  function automatic logic fits(input logic [LOAD_ADDR_W-1:0] a, input int unsigned aw);
    return (a >> aw) == '0;
  endfunction

  bram_2c #(.DEPTH(NH*NI), .WIDTH(8)) u_fc1_w_mem (
    .clk, .we(we_fc1_w && fits(load.addr, FC1W_AW)), .waddr(load.addr[FC1W_AW-1:0]),
    .wdata(load.data[7:0]), .raddr(fc1_w_raddr), .rdata(fc1_w_rdata));

  bram_2c #(.DEPTH(NH), .WIDTH(32)) u_fc1_b_mem (
    .clk, .we(we_fc1_b && fits(load.addr, FC1B_AW)), .waddr(load.addr[FC1B_AW-1:0]),
    .wdata(load.data), .raddr(fc1_b_raddr), .rdata(fc1_b_rdata));

  bram_2c #(.DEPTH(NO*NH), .WIDTH(8)) u_fc2_w_mem (
    .clk, .we(we_fc2_w && fits(load.addr, FC2W_AW)), .waddr(load.addr[FC2W_AW-1:0]),
    .wdata(load.data[7:0]), .raddr(fc2_w_raddr), .rdata(fc2_w_rdata));

  bram_2c #(.DEPTH(NO), .WIDTH(32)) u_fc2_b_mem (
    .clk, .we(we_fc2_b && fits(load.addr, FC2B_AW)), .waddr(load.addr[FC2B_AW-1:0]),
    .wdata(load.data), .raddr(fc2_b_raddr), .rdata(fc2_b_rdata));

  bram_2c #(.DEPTH(NI), .WIDTH(8)) u_img_mem (
    .clk, .we(we_img && fits(load.addr, IMG_AW)), .waddr(load.addr[IMG_AW-1:0]),
    .wdata(load.data[7:0]), .raddr(img_raddr), .rdata(img_rdata));

  bram_2c #(.DEPTH(NH), .WIDTH(32)) u_hidden_mem (
    .clk, .we(hid_we), .waddr(hid_waddr),
    .wdata(hid_wdata), .raddr(hid_raddr), .rdata(hid_rdata));

endmodule
