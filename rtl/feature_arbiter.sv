// feature_arbiter: merges the feature outputs of all pyramid scales into the
// single write port of the feature memory.
//
// Every scale input has a one-entry holding register. Each cycle at most one
// held feature is granted, round-robin starting after the last granted input,
// stamped with its scale index and written out. A scale produces at most one
// feature per 88 cycles, so one entry per input suffices for up to 88 scales; an
// input that arrives while its register is still occupied and not being granted
// is lost and flagged on `overflow` (this design's choice of policy).
//
// Interface: in_valid[N] / in_feat[N] (the scale field of in_feat is ignored),
// o_valid / o_feat (write request to the feature memory).
// Timing: a feature arriving in cycle T is written out in cycle T+1 at the
// earliest.
module feature_arbiter
  import orb_pkg::*;
#(
  parameter int unsigned N = N_SCALES,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid [N],
  input  feature_t in_feat  [N],
  output logic     o_valid,
  output feature_t o_feat,
  output logic     overflow
);
  logic     pend [N];
  feature_t hold [N];
  logic [IW-1:0] last;
  logic          gnt_v;
  logic [IW-1:0] gnt;

  // round-robin choice among held features
  always_comb begin
    gnt_v = 1'b0;
    gnt   = '0;
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (int'(last) + k) % N;
      if (!gnt_v && pend[idx]) begin
        gnt_v = 1'b1;
        gnt   = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) pend[i] <= 1'b0;
      last <= IW'(N - 1); o_valid <= 1'b0; o_feat <= '0; overflow <= 1'b0;
    end else begin
      o_valid  <= gnt_v;
      overflow <= 1'b0;
      if (gnt_v) begin
        o_feat       <= hold[gnt];
        o_feat.scale <= 2'(gnt);
        last         <= gnt;
      end
      for (int i = 0; i < N; i++) begin
        if (in_valid[i]) begin
          if (pend[i] && !(gnt_v && gnt == IW'(i))) overflow <= 1'b1;
          else pend[i] <= 1'b1;
        end else if (gnt_v && gnt == IW'(i)) begin
          pend[i] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk)
    for (int i = 0; i < N; i++)
      if (in_valid[i] && !(pend[i] && !(gnt_v && gnt == IW'(i)))) hold[i] <= in_feat[i];
endmodule
