// Two-pass 8x8 matrix transform with one multiply-accumulate unit, shared by the
// DCT and the IDCT.
//
// Each pass computes Y = (MD x MP^T)^T, that is Y[j][i] = sum_k MD[i][k]*MP[j][k],
// where MD is the data matrix and MP the coefficient matrix. Applying the pass
// twice gives B*A*B^T for MP = B (forward DCT) and B^T*A*B for MP = B^T (inverse,
// INVERSE=1). B[u][x] = C(u)/2*cos((2x+1)u*pi/16) with C(0)=1/sqrt(2), C(u>0)=1,
// held as 13-bit signed numbers with 12 fraction bits; every pass result is
// rounded to an integer and saturated to 16 bits.
//
// Interface and timing: 64 input words are taken in row-major order, one per
// in_valid cycle. The two passes then take 8 cycles per output (one product per
// cycle, like a repeated MAC), 1024 cycles in all. The 64 results then leave in
// row-major order on 64 consecutive cycles with out_valid (out_last on the
// last), without back-pressure. If in_skip is high with the 64th input, the block
// is dropped and the unit is at once ready for the next one. busy is high from the first input to the last
// output.
module mat8_xform #(
  parameter bit INVERSE = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] in_data,
  input  logic               in_skip,
  output logic               out_valid,
  output logic               out_last,
  output logic signed [15:0] out_data,
  output logic               busy
);
  // cos(k*pi/16)/2 in Q12 for k = 0..8 (entry 0 is used as C(0)/2 = 1/(2*sqrt 2))
  localparam logic signed [12:0] CT [9] = '{13'sd1448, 13'sd2009, 13'sd1892, 13'sd1703,
                                            13'sd1448, 13'sd1138, 13'sd784,  13'sd400,
                                            13'sd0};

  // B[u][x] in Q12
  function automatic logic signed [12:0] bcoef(input logic [2:0] u, input logic [2:0] x);
    int unsigned k;
    if (u == 3'd0) return CT[0];
    k = ((2 * int'(x) + 1) * int'(u)) % 32;
    if (k <= 8)       return  CT[k];
    else if (k <= 16) return -CT[16 - k];
    else if (k <= 24) return -CT[k - 16];
    else              return  CT[32 - k];
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_e;
  state_e state;

  logic signed [15:0] ma [64];   // pass 0 source, pass 1 destination, output
  logic signed [15:0] mb [64];   // pass 0 destination, pass 1 source
  logic [5:0]  cnt;              // load / output counter
  logic        pass;
  logic [2:0]  j, i, k;
  logic signed [31:0] acc;

  logic signed [15:0] d_op;
  logic signed [12:0] c_op;
  logic signed [31:0] acc_n, rnd;
  logic signed [15:0] res;

  always_comb begin
    d_op  = pass ? mb[{i, k}] : ma[{i, k}];
    c_op  = INVERSE ? bcoef(k, j) : bcoef(j, k);
    acc_n = acc + 32'(d_op * c_op);
    rnd   = (acc_n + 32'sd2048) >>> 12;
    if (rnd > 32'sd32767)       res = 16'sh7fff;
    else if (rnd < -32'sd32768) res = -16'sh8000;
    else                        res = rnd[15:0];
  end

  assign busy      = (state != S_LOAD) || (cnt != '0);
  assign out_data  = ma[cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      pass      <= 1'b0;
      j         <= '0;
      i         <= '0;
      k         <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          ma[cnt] <= in_data;
          cnt     <= cnt + 6'd1;
          if (cnt == 6'd63 && !in_skip) begin
            state <= S_CALC;
            pass  <= 1'b0;
            {j, i, k} <= '0;
            acc   <= '0;
          end
        end
        S_CALC: begin
          k <= k + 3'd1;
          if (k == 3'd7) begin
            acc <= '0;
            if (pass) ma[{j, i}] <= res;
            else      mb[{j, i}] <= res;
            {j, i} <= {j, i} + 6'd1;
            if ({j, i} == 6'd63) begin
              if (pass) begin
                state     <= S_OUT;
                cnt       <= '0;
                out_valid <= 1'b1;
                out_last  <= 1'b0;
              end
              pass <= ~pass;
            end
          end else begin
            acc <= acc_n;
          end
        end
        S_OUT: begin
          cnt      <= cnt + 6'd1;
          out_last <= (cnt == 6'd62);
          if (cnt == 6'd63) begin
            state     <= S_LOAD;
            out_valid <= 1'b0;
            cnt       <= '0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
