// auto_start: one start pulse a fixed time after reset, for running an
// inference with no host software (memories preloaded at configuration).
//
// A CNT_W-bit counter starts at zero when reset is released and counts one
// per clock. When it reaches its maximum value it stops and, in that one
// cycle, raises pulse unless load_mode is high; a pulse that meets
// load_mode = 1 is simply lost, so the unit never disturbs a host that is
// using the register interface. At the default 16 bits the pulse comes
// 65,535 cycles after reset, about 1.3 ms at 50 MHz. The 16-bit width, the
// one-shot behaviour and the load_mode gating follow the design
// description; firing at the counter's all-ones value is this design's own
// choice.
module auto_start #(
  parameter int unsigned CNT_W = 16
) (
  input  logic clk,
  input  logic reset,
  input  logic load_mode,
  output logic pulse
);

  logic [CNT_W-1:0] cnt;
  logic             fired;

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt   <= '0;
      fired <= 1'b0;
    end else if (!fired) begin
      if (&cnt) fired <= 1'b1;
      else      cnt   <= cnt + 1'b1;
    end
  end

  assign pulse = !fired && (&cnt) && !load_mode;

endmodule
