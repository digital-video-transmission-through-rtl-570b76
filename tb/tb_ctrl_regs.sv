// Self-checking test of ctrl_regs: start pulses from either DSP, sticky done
// flags and their clearing, busy flags in STATUS, and the two mailboxes with
// their full flags.
module tb_ctrl_regs;
  logic clk = 0, rst_n = 0;
  logic [1:0] sel = 0, we = 0;
  logic [1:0][1:0] addr = '0;
  logic [1:0][15:0] wdata = '0, rdata;
  logic acq_start, xfer_start;
  logic acq_busy = 0, acq_done = 0, xfer_busy = 0, xfer_done = 0;
  int checks = 0, failures = 0;
  int n_acq = 0, n_xfer = 0;

  ctrl_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (acq_start) n_acq++;
    if (xfer_start) n_xfer++;
  end

  task automatic wr(input int d, input logic [1:0] a, input logic [15:0] v);
    @(negedge clk); sel[d] = 1; we[d] = 1; addr[d] = a; wdata[d] = v;
    @(negedge clk); sel[d] = 0; we[d] = 0;
  endtask

  task automatic rd(input int d, input logic [1:0] a, output logic [15:0] v);
    @(negedge clk); sel[d] = 1; we[d] = 0; addr[d] = a;
    @(posedge clk); #1; v = rdata[d];
    @(negedge clk); sel[d] = 0;
  endtask

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(0, 2'd1, v); expect_eq(v, 16'h0000, "status after reset");
    wr(0, 2'd0, 16'h0001);
    expect_eq(16'(n_acq), 16'd1, "one acquisition start");
    expect_eq(16'(n_xfer), 16'd0, "no transfer start");
    acq_busy = 1;
    rd(1, 2'd1, v); expect_eq(v, 16'h0001, "acq busy");
    @(negedge clk); acq_busy = 0; acq_done = 1;
    @(negedge clk); acq_done = 0;
    rd(1, 2'd1, v); expect_eq(v, 16'h0002, "acq done sticky");
    wr(1, 2'd0, 16'h0002);
    expect_eq(16'(n_xfer), 16'd1, "transfer start from DSP 1");
    @(negedge clk); xfer_busy = 1;
    rd(0, 2'd1, v); expect_eq(v, 16'h0006, "xfer busy, acq done");
    @(negedge clk); xfer_busy = 0; xfer_done = 1;
    @(negedge clk); xfer_done = 0;
    wr(0, 2'd0, 16'h0001);
    rd(0, 2'd1, v); expect_eq(v, 16'h0008, "acq done cleared by new start, xfer done kept");
    // mailboxes
    wr(0, 2'd2, 16'hbeef);
    rd(1, 2'd1, v); expect_eq(v & 16'h0030, 16'h0010, "mailbox 0->1 full");
    rd(1, 2'd3, v); expect_eq(v, 16'hbeef, "DSP 1 reads DSP 0's word");
    rd(1, 2'd1, v); expect_eq(v & 16'h0030, 16'h0000, "mailbox emptied");
    wr(1, 2'd2, 16'h1234);
    rd(0, 2'd1, v); expect_eq(v & 16'h0030, 16'h0020, "mailbox 1->0 full");
    rd(0, 2'd3, v); expect_eq(v, 16'h1234, "DSP 0 reads DSP 1's word");
    rd(0, 2'd0, v); expect_eq(v, 16'h0000, "CTRL reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
