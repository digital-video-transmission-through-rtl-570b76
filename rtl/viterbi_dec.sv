// Hard-decision Viterbi decoder of the receive path for the rate 1/2, K=7 code
// of conv_enc (generators 171 and 133 octal).
//
// The trellis has 64 states, the last six data bits. All 64 add-compare-select
// steps run in parallel, one received code pair per in_valid. The branch metric
// is the Hamming distance between the received pair and the pair the branch would
// have sent. Path metrics are 8-bit and wrap around; two metrics are compared by
// the sign of their difference, which is exact while they stay within 127 of each
// other: they start at most 32 apart and settle within 12, since every state is
// reachable from the best one in six steps that add at most 2 each.
// Survivors are kept by register exchange: each state holds the last DEPTH data
// bits of its best path, so no traceback is needed. The decoded bit is the oldest
// bit of the survivor of the state with the best metric.
//
// Interface and timing: in_valid/in_code carry one received pair. After the
// first DEPTH pairs, each pair also gives one decoded bit: out_valid pulses the
// cycle after in_valid with out_bit, the data bit sent DEPTH pairs earlier. The
// decoder starts in state 0, as the encoder does after reset.
//
// The document names the algorithm and a codec chip for it; the code, the hard
// decisions, the metric width and the survivor depth (32, about five constraint
// lengths) are this design's choices.
module viterbi_dec #(
  parameter logic [6:0]  G0    = 7'o171,
  parameter logic [6:0]  G1    = 7'o133,
  parameter int unsigned DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] in_code,
  output logic       out_valid,
  output logic       out_bit
);
  localparam int unsigned NS = 64;

  logic [7:0]       pm   [NS];
  logic [DEPTH-1:0] surv [NS];
  logic [7:0]       pm_n [NS];
  logic [DEPTH-1:0] surv_n [NS];
  logic [$clog2(DEPTH+1)-1:0] fill;

  function automatic logic [1:0] branch(input logic u, input logic [5:0] s);
    return {^(G1 & {u, s}), ^(G0 & {u, s})};
  endfunction

  function automatic logic [1:0] hamming(input logic [1:0] a, input logic [1:0] b);
    logic [1:0] x;
    x = a ^ b;
    return {1'b0, x[0]} + {1'b0, x[1]};
  endfunction

  // a is better (smaller) than or as good as b, in wrap-around arithmetic
  function automatic logic le(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] d;
    d = a - b;
    return d[7] || (d == 8'd0);
  endfunction

  // add-compare-select: new state n = {u, s[5:1]} is reached from {n[4:0], 0}
  // and {n[4:0], 1} with data bit u = n[5]
  always_comb begin
    for (int n = 0; n < NS; n++) begin
      logic [5:0] p0, p1;
      logic [7:0] m0, m1;
      logic       u;
      u  = 1'(n >> 5);
      p0 = 6'(n * 2);
      p1 = p0 | 6'd1;
      m0 = pm[p0] + 8'(hamming(branch(u, p0), in_code));
      m1 = pm[p1] + 8'(hamming(branch(u, p1), in_code));
      if (le(m0, m1)) begin
        pm_n[n]   = m0;
        surv_n[n] = {surv[p0][DEPTH-2:0], u};
      end else begin
        pm_n[n]   = m1;
        surv_n[n] = {surv[p1][DEPTH-2:0], u};
      end
    end
  end

  // state with the best metric, by a comparison tree
  logic [5:0] best;
  always_comb begin
    logic [5:0] idx [NS];
    for (int i = 0; i < NS; i++) idx[i] = 6'(i);
    for (int w = NS / 2; w >= 1; w = w / 2)
      for (int i = 0; i < w; i++)
        idx[i] = le(pm[idx[2 * i]], pm[idx[2 * i + 1]]) ? idx[2 * i] : idx[2 * i + 1];
    best = idx[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NS; n++) begin
        pm[n]   <= (n == 0) ? 8'd0 : 8'd32;
        surv[n] <= '0;
      end
      fill      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int n = 0; n < NS; n++) begin
          pm[n]   <= pm_n[n];
          surv[n] <= surv_n[n];
        end
        if (fill == $bits(fill)'(DEPTH)) begin
          out_valid <= 1'b1;
          out_bit   <= surv[best][DEPTH-1];
        end else begin
          fill <= fill + 1'b1;
        end
      end
    end
  end
endmodule
