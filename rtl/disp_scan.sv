// FPGA3 output section of the decoder: the pixel counter and state machine that
// read the picture out of the three dual-port RAMs in raster order for the D/A.
//
// After the first complete picture has been written (frame_ready), the state
// machine leaves IDLE and scans the 176x144 picture over and over, one pixel per
// pix_en strobe. The counter addresses the three display EPROMs; their outputs
// address the Y, Cr and Cb RAMs; the RAM outputs go to the D/A. The EPROM and
// RAM reads are both clocked by pix_en, so a pixel reaches the outputs two
// strobes after its count: out_valid, out_first (first pixel of a picture) and
// out_line (first pixel of a line) are delayed to match. Each chrominance sample
// is presented on the four pixels it covers.
//
// The document gives the structure (counter, three EPROMs, RAMs, a state
// machine); the continuous refresh, the pixel strobe and the way chrominance is
// presented are this design's choices.
//
// The EPROM outputs drive the RAM read addresses, and the RAM outputs drive the
// D/A, with no logic between: on the board these are plain wires through FPGA3.
// The chrominance EPROMs are 15 bits wide like the luminance one, but their
// addresses fit in 13 bits, so the top two bits are unused.
module disp_scan
  import pltv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_ready,
  input  logic        pix_en,
  // counter to the three EPROMs
  output logic        rom_en,
  output logic [14:0] pix_cnt,
  // EPROM outputs to RAM read ports
  input  logic [14:0] rom_y,
  input  logic [14:0] rom_cr,
  input  logic [14:0] rom_cb,
  output logic        ram_en,
  output logic [14:0] ram_addr_y,
  output logic [12:0] ram_addr_cr,
  output logic [12:0] ram_addr_cb,
  input  logic [7:0]  ram_y,
  input  logic [7:0]  ram_cr,
  input  logic [7:0]  ram_cb,
  // to the D/A
  output logic [7:0]  y_out,
  output logic [7:0]  cr_out,
  output logic [7:0]  cb_out,
  output logic        out_valid,
  output logic        out_first,
  output logic        out_line,
  output logic        running
);
  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e     state;
  logic [7:0] col;
  logic [1:0] v_pipe, f_pipe, l_pipe;

  assign running     = (state == S_RUN);
  assign rom_en      = pix_en;
  assign ram_en      = pix_en;
  assign ram_addr_y  = rom_y;
  assign ram_addr_cr = rom_cr[12:0];
  assign ram_addr_cb = rom_cb[12:0];
  assign y_out       = ram_y;
  assign cr_out      = ram_cr;
  assign cb_out      = ram_cb;
  assign out_valid   = v_pipe[1];
  assign out_first   = f_pipe[1];
  assign out_line    = l_pipe[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pix_cnt <= '0;
      col     <= '0;
      v_pipe  <= '0;
      f_pipe  <= '0;
      l_pipe  <= '0;
    end else begin
      if (state == S_IDLE && frame_ready) begin
        state   <= S_RUN;
        pix_cnt <= '0;
        col     <= '0;
      end
      if (pix_en) begin
        v_pipe <= {v_pipe[0], running};
        f_pipe <= {f_pipe[0], running && pix_cnt == '0};
        l_pipe <= {l_pipe[0], running && col == '0};
        if (running) begin
          if (pix_cnt == 15'(Y_SAMPLES - 1)) pix_cnt <= '0;
          else                                pix_cnt <= pix_cnt + 15'd1;
          col <= (col == 8'(QCIF_W - 1)) ? '0 : col + 8'd1;
        end
      end
    end
  end
endmodule
