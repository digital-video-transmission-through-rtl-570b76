// Dequantizer and 8x8 inverse DCT that uses the block qualification to skip work.
//
// Levels arrive row-major, one per in_valid cycle; the block's qualification
// (in_qual) is given with the 64th level, which is when the quantizer that made
// it knows it. Each level is dequantized by a left shift of qshift bits
// (quantization steps are powers of two). Then:
//   QUAL_ZERO: the result is 64 zeros, with no arithmetic;
//   QUAL_DC:   every sample is F(0,0)/8 (rounded to nearest), since for a block
//              whose only coefficient is the DC one the IDCT reduces to that;
//   QUAL_FULL: the full two-pass transform f = B^T*F*B (mat8_xform, INVERSE=1).
//
// Timing: after the 64th input the 64 results follow on consecutive cycles
// (out_valid, out_last on the last), at once for the two short cases and after
// the 1024-cycle transform for QUAL_FULL.
// From the document: dequantization by left shift, the three cases and the
// transposed coefficient matrix. The rounding of F(0,0)/8 is this design's
// choice: the document describes it both as a division by 8 and as a
// 3-position shift; the division, which its Eq. 3 derives, is what is built.
module idct_dq
  import pltv_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [2:0]         qshift,
  input  logic               in_valid,
  input  logic signed [15:0] in_level,
  input  qual_e              in_qual,
  output logic               out_valid,
  output logic               out_last,
  output logic signed [15:0] out_data,
  output logic               busy
);
  typedef enum logic [1:0] {S_LOAD, S_FULL, S_SHORT} state_e;
  state_e             state;
  qual_e              qual_q;
  logic [5:0]         cnt;
  logic signed [15:0] coef, dc_q, dc_val;
  logic               x_in, x_skip, x_valid, x_last, x_busy;
  logic signed [15:0] x_data;

  assign coef   = in_level <<< qshift;
  assign x_in   = in_valid && (state == S_LOAD);
  assign x_skip = (in_qual != QUAL_FULL);
  assign dc_val = (qual_q == QUAL_DC) ? 16'((32'(dc_q) + 32'sd4) >>> 3) : 16'sd0;

  mat8_xform #(.INVERSE(1'b1)) u_xf (
    .clk, .rst_n, .in_valid(x_in), .in_data(coef), .in_skip(x_skip),
    .out_valid(x_valid), .out_last(x_last), .out_data(x_data), .busy(x_busy)
  );

  always_comb begin
    if (state == S_SHORT) begin
      out_valid = 1'b1;
      out_last  = (cnt == 6'd63);
      out_data  = dc_val;
    end else begin
      out_valid = x_valid;
      out_last  = x_last;
      out_data  = x_data;
    end
  end

  assign busy = (state != S_LOAD) || x_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      qual_q <= QUAL_ZERO;
      cnt    <= '0;
      dc_q   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == 6'd0) dc_q <= coef;
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) begin
            qual_q <= in_qual;
            state  <= (in_qual == QUAL_FULL) ? S_FULL : S_SHORT;
          end
        end
        S_FULL:  if (x_last) state <= S_LOAD;
        S_SHORT: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
