// Video buffer: first-in first-out memory of 16-bit words between a DSP and a
// microcontroller (FIFO1 and FIFO2 after the coder DSPs, FIFO3 before the
// decoder DSP).
//
// Single clock. A write (wr_en) stores wdata unless the FIFO is full; a read
// (rd_en) removes the oldest word unless it is empty. rdata always shows the
// oldest word (first-word fall-through), so the reader samples it in the cycle
// it asserts rd_en. A write to a full FIFO is dropped and sets the sticky
// overflow flag; the writer is expected to watch full.
//
// The document gives the 16-bit word and the role; the depth (1024 words) and
// the single-clock, fall-through organisation are this design's choices.
module video_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wdata,
  output logic                   full,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       rdata,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count,
  output logic                   overflow
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(do_wr) - (PW+1)'(do_rd);
      if (wr_en && full) overflow <= 1'b1;
    end
  end
endmodule
