// Convolutional encoder of the transmit path: rate 1/2, constraint length 7,
// generators 171 and 133 (octal).
//
// Each data bit taken from the coder microcontroller becomes a pair of code bits
// for the modem. The encoder keeps the last six data bits in a shift register;
// code bit c[0] is the parity of the new bit and the register under generator
// 171 (taps at delays 0,1,2,3,6), c[1] under generator 133 (delays 0,2,3,5,6).
//
// Interface and timing: in_valid/in_bit come straight from the bit source and
// in_take is the modem's strobe; code is a combinational function of the
// register and in_bit, valid while out_valid (= in_valid) is high, and the
// register shifts when in_valid and in_take are both high, so one bit in and one
// code pair out per strobe with no latency. The register starts at zero.
// out_valid is in_valid passed through, so the modem sees one valid for the
// pair it is about to take.
//
// The document only says the stream is protected by a Viterbi-decoded code from a
// dedicated codec chip; the code itself (the common K=7, rate 1/2 code that such
// chips implement) and this interface are this design's choices.
module conv_enc #(
  parameter logic [6:0] G0 = 7'o171,
  parameter logic [6:0] G1 = 7'o133
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  input  logic       in_take,
  output logic       out_valid,
  output logic [1:0] code
);
  logic [5:0] sr;   // sr[5] = previous bit, sr[0] = six bits ago

  assign out_valid = in_valid;
  assign code[0]   = ^(G0 & {in_bit, sr});
  assign code[1]   = ^(G1 & {in_bit, sr});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else if (in_valid && in_take) sr <= {in_bit, sr[5:1]};
  end
endmodule
