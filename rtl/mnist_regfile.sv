// mnist_regfile: Avalon-MM slave front end and the eight 32-bit registers.
//
//   word 0 CONTROL     W  bit0 start (one-cycle pulse), bit1 load_mode
//                         (held until rewritten), bit2 clear_done (pulse)
//   word 1 STATUS      R  bit0 busy, bit1 done
//   word 2 RESULT      R  bits[3:0] predicted digit
//   word 3 CONFIDENCE  R  low 32 bits of the winning FC2 accumulator
//   word 4 LOAD_ADDR   RW target-local write index
//   word 5 LOAD_DATA   W  data for the selected memory at LOAD_ADDR
//   word 6 LOAD_TARGET W  bits[2:0] memory select; writing it zeroes LOAD_ADDR
//   word 7 VERSION     R  constant 0x4D4E5301
//
// A write to CONTROL sets start_pulse and clear_done_pulse high for exactly
// the following cycle and stores load_mode. While load_mode is 1, every
// LOAD_DATA write produces, in the same cycle, a write of writedata into the
// selected memory at the current LOAD_ADDR, and LOAD_ADDR then advances by
// one whatever the target, so back-to-back writes stream one word per clock.
// LOAD_DATA writes outside load mode are ignored. readdata is combinational
// from address (zero wait states); write-only registers read as 0.
// The register map, bit positions, the streaming and auto-increment rules
// and VERSION follow the design description; the synchronous active-high
// reset, the read timing and ignoring LOAD_DATA outside load mode are this
// design's own choices.
module mnist_regfile
  import mnist_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  // Avalon-MM slave
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [3:0]  address,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  // status from the controller and datapath
  input  logic        busy,
  input  logic        done,
  input  logic [3:0]  result,
  input  logic [31:0] confidence,
  // control to the controller
  output logic        start_pulse,
  output logic        load_mode,
  output logic        clear_done_pulse,
  // load path to the memories
  output load_wr_t    load
);

  logic [LOAD_ADDR_W-1:0] load_addr;
  logic [2:0]             load_target;

  logic wr_en;
  assign wr_en = chipselect && write;

  logic load_data_wr;
  assign load_data_wr = wr_en && (address == REG_LOAD_DATA) && load_mode;

  always_ff @(posedge clk) begin
    if (reset) begin
      start_pulse      <= 1'b0;
      clear_done_pulse <= 1'b0;
      load_mode        <= 1'b0;
      load_addr        <= '0;
      load_target      <= '0;
    end else begin
      start_pulse      <= 1'b0;
      clear_done_pulse <= 1'b0;
      if (wr_en) begin
        unique case (address)
          REG_CONTROL: begin
            start_pulse      <= writedata[CTRL_START];
            load_mode        <= writedata[CTRL_LOAD_MODE];
            clear_done_pulse <= writedata[CTRL_CLEAR_DONE];
          end
          REG_LOAD_ADDR:   load_addr <= writedata[LOAD_ADDR_W-1:0];
          REG_LOAD_TARGET: begin
            load_target <= writedata[2:0];
            load_addr   <= '0;
          end
          default: ;
        endcase
      end
      if (load_data_wr)
        load_addr <= load_addr + 1'b1;
    end
  end

  always_comb begin
    load.we     = load_data_wr;
    load.target = load_target;
    load.addr   = load_addr;
    load.data   = writedata;
  end

  always_comb begin
    readdata = '0;
    if (chipselect && read) begin
      unique case (address)
        REG_STATUS: begin
          readdata[STAT_BUSY] = busy;
          readdata[STAT_DONE] = done;
        end
        REG_RESULT:      readdata[3:0] = result;
        REG_CONFIDENCE:  readdata = confidence;
        REG_LOAD_ADDR:   readdata[LOAD_ADDR_W-1:0] = load_addr;
        REG_VERSION:     readdata = VERSION;
        default:         ;  // write-only and unmapped words read as 0
      endcase
    end
  end

  // a start or clear_done pulse only ever follows a CONTROL write of that bit
  a_start_pulse: assert property (@(posedge clk) disable iff (reset)
    start_pulse |-> $past(wr_en && address == REG_CONTROL && writedata[CTRL_START]));
  a_clear_pulse: assert property (@(posedge clk) disable iff (reset)
    clear_done_pulse |-> $past(wr_en && address == REG_CONTROL && writedata[CTRL_CLEAR_DONE]));
  // Avalon-MM: a master never reads and writes in the same cycle
  a_no_rw: assert property (@(posedge clk) disable iff (reset)
    chipselect |-> !(read && write));

endmodule
