// argmax_scan: index of the largest of N signed values, by a linear scan of
// one element per clock.
//
// While en is high the unit visits element k = 0, 1, ..., N-1 on
// consecutive cycles: element 0 becomes the running best, and each later
// element replaces it only if it is strictly greater, so on a tie the
// lowest index wins (numpy's argmax rule). last is high in the cycle that
// visits element N-1; in that cycle idx_next and best_next already show the
// final answer, so a register can capture it at the same clock edge.
// A scan takes exactly N cycles; dropping en before the end restarts the
// next scan at element 0. The strict comparison and the N-cycle scan follow
// the design description; the idx_next/best_next look-ahead outputs are this
// design's own choice.
module argmax_scan #(
  parameter int unsigned N     = 10,
  parameter int unsigned W     = 48,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    en,
  input  logic signed [W-1:0]     vals [N],
  output logic                    last,
  output logic [IDX_W-1:0]        idx_next,
  output logic signed [W-1:0]     best_next
);

  logic [IDX_W-1:0]    k;
  logic [IDX_W-1:0]    idx_q;
  logic signed [W-1:0] best_q;

  always_comb begin
    if (k == '0 || vals[k] > best_q) begin
      idx_next  = k;
      best_next = vals[k];
    end else begin
      idx_next  = idx_q;
      best_next = best_q;
    end
  end

  assign last = en && (32'(k) == N - 1);

  always_ff @(posedge clk) begin
    if (reset) begin
      k      <= '0;
      idx_q  <= '0;
      best_q <= '0;
    end else if (en) begin
      idx_q  <= idx_next;
      best_q <= best_next;
      k      <= last ? '0 : k + 1'b1;
    end else begin
      k <= '0;
    end
  end

endmodule
