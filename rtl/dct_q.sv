// Forward 8x8 DCT with the quantizer and the block qualification folded in.
//
// The block (64 signed samples, row-major, normally prediction differences) is
// transformed by two identical matrix passes, F = B*A*B^T (mat8_xform). Each
// coefficient is then quantized as it leaves: the quantization step is a power
// of two, 2^qshift, and the level is the coefficient divided by it and truncated
// towards zero. While the levels stream out, the block is qualified: QUAL_ZERO
// if all 64 levels are zero, QUAL_DC if only the first (DC) level is non-zero,
// QUAL_FULL otherwise; qual is valid with out_last.
//
// Timing: 64 input cycles, 1024 transform cycles, 64 output cycles (1152 in
// all); qshift must be stable from the first input to the last output.
// From the document: the two-pass matrix-multiply DCT, quantization with steps
// 2^i done together with the DCT, and the three-way qualification. The
// fixed-point format and truncating division are this design's choices.
module dct_q
  import pltv_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [2:0]         qshift,
  input  logic               in_valid,
  input  logic signed [15:0] in_data,
  output logic               out_valid,
  output logic               out_last,
  output logic signed [15:0] out_level,
  output qual_e              qual,
  output logic               busy
);
  logic               t_valid, t_last;
  logic signed [15:0] t_data;
  logic [5:0]         idx;
  logic               nz_dc, nz_ac;
  logic               nz_dc_n, nz_ac_n;
  logic signed [15:0] mag, lvl;

  mat8_xform #(.INVERSE(1'b0)) u_xf (
    .clk, .rst_n, .in_valid, .in_data, .in_skip(1'b0),
    .out_valid(t_valid), .out_last(t_last), .out_data(t_data), .busy
  );

  always_comb begin
    mag = (t_data < 0) ? -t_data : t_data;
    lvl = mag >>> qshift;
    if (t_data < 0) lvl = -lvl;
    nz_dc_n = (idx == 6'd0) ? (lvl != 0) : nz_dc;
    nz_ac_n = (idx == 6'd0) ? 1'b0 : (nz_ac || (lvl != 0));
  end

  assign out_valid = t_valid;
  assign out_last  = t_last;
  assign out_level = lvl;

  always_comb begin
    if (nz_ac_n)      qual = QUAL_FULL;
    else if (nz_dc_n) qual = QUAL_DC;
    else              qual = QUAL_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx   <= '0;
      nz_dc <= 1'b0;
      nz_ac <= 1'b0;
    end else if (t_valid) begin
      idx   <= t_last ? 6'd0 : idx + 6'd1;
      nz_dc <= nz_dc_n;
      nz_ac <= nz_ac_n;
    end
  end
endmodule
