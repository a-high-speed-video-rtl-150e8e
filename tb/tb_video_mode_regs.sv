// tb_video_mode_regs: checks the video mode and control registers.
//
// After reset every register must read back the NTSC-like defaults (762
// clocks per line with 656 active, 525 lines with 480 active) and the
// timing outputs must carry them.  Each register is then written with a
// random value and read back, through rdata (one clock late) and through
// the timing outputs; the freeze bit and the read-only status are checked,
// and a write to the status number must change nothing.
module tb_video_mode_regs;
  import video_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr = 1'b0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [1:0] status = 2'b10;
  timing_t tim;
  logic freeze;
  int checks = 0, failures = 0;

  video_mode_regs dut (.*);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect16(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic rd(input logic [3:0] a, output logic [15:0] d);
    rd_addr = a;
    @(posedge clk); #1;
    d = rdata;
  endtask

  function automatic logic [TIM_W-1:0] field(input timing_t t, input int n);
    case (n)
      1: return t.h_active;  2: return t.h_front;  3: return t.h_sync;  4: return t.h_back;
      5: return t.v_active;  6: return t.v_front;  7: return t.v_sync;  default: return t.v_back;
    endcase
  endfunction

  initial begin
    logic [15:0] d;
    int defaults [9] = '{0, 656, 16, 56, 34, 480, 10, 6, 29};
    logic [15:0] v [9];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 9; n++) begin
      rd(4'(n), d);
      expect16(d, 16'(defaults[n]), $sformatf("default of register %0d", n));
      if (n > 0) expect16(16'(field(tim, n)), 16'(defaults[n]), $sformatf("timing output %0d", n));
    end
    expect16(16'(defaults[1] + defaults[2] + defaults[3] + defaults[4]), 16'd762, "line length");
    expect16(16'(defaults[5] + defaults[6] + defaults[7] + defaults[8]), 16'd525, "frame length");
    rd(VR_STATUS, d);
    expect16(d, 16'd2, "status");
    status = 2'b01;
    rd(VR_STATUS, d);
    expect16(d, 16'd1, "status follows input");
    for (int n = 1; n < 9; n++) begin
      v[n] = 16'($urandom % 4096);
      wr = 1'b1; wr_addr = 4'(n); wdata = v[n];
      @(posedge clk); #1;
      wr = 1'b0;
    end
    for (int n = 1; n < 9; n++) begin
      rd(4'(n), d);
      expect16(d, v[n], $sformatf("register %0d", n));
      expect16(16'(field(tim, n)), v[n], $sformatf("timing output %0d", n));
    end
    expect16(16'(freeze), 16'd0, "freeze after reset");
    wr = 1'b1; wr_addr = VR_CTRL; wdata = 16'h0001;
    @(posedge clk); #1;
    wr = 1'b0;
    expect16(16'(freeze), 16'd1, "freeze set");
    rd(VR_CTRL, d);
    expect16(d, 16'd1, "ctrl readback");
    wr = 1'b1; wr_addr = VR_STATUS; wdata = 16'hFFFF;
    @(posedge clk); #1;
    wr = 1'b0;
    rd(VR_STATUS, d);
    expect16(d, 16'd1, "status is read only");
    wr = 1'b1; wr_addr = VR_CTRL; wdata = 16'h0000;
    @(posedge clk); #1;
    wr = 1'b0;
    expect16(16'(freeze), 16'd0, "freeze cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
