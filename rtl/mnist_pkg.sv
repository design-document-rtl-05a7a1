// mnist_pkg: constants and types shared by the MNIST MLP accelerator.
//
// Holds the network shape (784 inputs, 128 hidden neurons, 10 outputs),
// the word addresses of the eight Avalon-MM registers, the LOAD_TARGET
// encoding of the five loadable memories, the 15 controller states and the
// bundle the register file uses to write a memory on the load path.
// The register map, the target codes, the VERSION constant and the state
// names follow the design description; the numeric state encoding and the
// layout of the load bundle are this design's own choice.
package mnist_pkg;

  // Network shape
  localparam int unsigned N_IN  = 784;
  localparam int unsigned N_HID = 128;
  localparam int unsigned N_OUT = 10;

  // Arithmetic widths
  localparam int unsigned ACC1_W = 32; // FC1 accumulator and hidden activations
  localparam int unsigned ACC2_W = 48; // FC2 accumulator and out_regs

  // Width of LOAD_ADDR (indexes the 100,352-entry FC1 weight memory)
  localparam int unsigned LOAD_ADDR_W = 17;

  localparam logic [31:0] VERSION = 32'h4D4E_5301; // "MNS" + 0x01

  // Register word addresses (byte offset = 4 * word)
  typedef enum logic [3:0] {
    REG_CONTROL     = 4'd0,
    REG_STATUS      = 4'd1,
    REG_RESULT      = 4'd2,
    REG_CONFIDENCE  = 4'd3,
    REG_LOAD_ADDR   = 4'd4,
    REG_LOAD_DATA   = 4'd5,
    REG_LOAD_TARGET = 4'd6,
    REG_VERSION     = 4'd7
  } reg_addr_e;

  // CONTROL bit positions
  localparam int unsigned CTRL_START      = 0;
  localparam int unsigned CTRL_LOAD_MODE  = 1;
  localparam int unsigned CTRL_CLEAR_DONE = 2;

  // STATUS bit positions
  localparam int unsigned STAT_BUSY = 0;
  localparam int unsigned STAT_DONE = 1;

  // LOAD_TARGET encoding; codes 5..7 are reserved and write nothing
  typedef enum logic [2:0] {
    TGT_FC1_W = 3'd0,
    TGT_FC1_B = 3'd1,
    TGT_FC2_W = 3'd2,
    TGT_FC2_B = 3'd3,
    TGT_IMAGE = 3'd4
  } load_target_e;

  // One memory write issued by the load path
  typedef struct packed {
    logic                   we;
    logic [2:0]             target;
    logic [LOAD_ADDR_W-1:0] addr;
    logic [31:0]            data;
  } load_wr_t;

  // Controller states
  typedef enum logic [3:0] {
    S_IDLE,
    S_FC1_NEXT_J,
    S_FC1_BIAS_WAIT,
    S_FC1_BIAS_LOAD,
    S_FC1_MAC_WAIT,
    S_FC1_MAC,
    S_FC1_STORE,
    S_FC2_NEXT_J,
    S_FC2_BIAS_WAIT,
    S_FC2_BIAS_LOAD,
    S_FC2_MAC_WAIT,
    S_FC2_MAC,
    S_FC2_STORE,
    S_ARGMAX,
    S_DONE
  } state_e;

endpackage
