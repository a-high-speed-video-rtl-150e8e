// tb_controller: checks buffer roles, freeze, blanking and host grants.
//
// The testbench drives a small raster (5 active pixels of 9 per line, 4
// active lines of 6 per frame) into de and vblank for 10 frames, raises the
// freeze request during frames 3 to 5 and requests host access at random.
// A model of the controller's state, kept from the rules alone (roles swap
// at the first clock of vertical blanking unless frozen; a freeze request is
// taken at that clock), predicts every output in every clock: the pipeline
// enables one and two clocks after de, the buffer selects, the host grant
// (only when no pipeline stage is active) and the mode.
module tb_controller;
  import video_pkg::*;
  localparam int HA = 5, HT = 9, VA = 4, VT = 6, FRAMES = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic de = 1'b0, vblank = 1'b0, freeze = 1'b0, host_req = 1'b0;
  logic host_grant, pm_rd, wr_en, wr_buf, rd_en, rd_buf, lut_rd, disp_sel, frozen, swap;
  mode_e mode;
  int checks = 0, failures = 0;

  controller dut (.*);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what, input int f, input int v, input int h);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s frame %0d line %0d pixel %0d: %0b expected %0b", what, f, v, h, got, exp);
    end
  endtask

  initial begin
    logic m_disp, m_frozen, m_de1, m_de2, m_disp1, m_vb_q, busy, fs;
    int n_swap, n_freeze_clk, n_grant, n_denied;
    mode_e m_mode;
    m_disp = 0; m_frozen = 0; m_de1 = 0; m_de2 = 0; m_disp1 = 0; m_vb_q = 0;
    n_swap = 0; n_freeze_clk = 0; n_grant = 0; n_denied = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++)
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          de       = (h < HA) && (v < VA);
          vblank   = (v >= VA);
          freeze   = (f >= 3) && (f <= 5);
          host_req = ($urandom % 3) == 0;
          #1;
          busy = de | m_de1 | m_de2;
          fs   = vblank && !m_vb_q;
          chk(pm_rd,  de, "pm_rd", f, v, h);
          chk(rd_en,  m_de1, "rd_en", f, v, h);
          chk(lut_rd, m_de2, "lut_rd", f, v, h);
          chk(wr_en,  de && !m_frozen, "wr_en", f, v, h);
          chk(wr_buf, !m_disp, "wr_buf", f, v, h);
          chk(rd_buf, m_disp1, "rd_buf", f, v, h);
          chk(disp_sel, m_disp, "disp_sel", f, v, h);
          chk(frozen, m_frozen, "frozen", f, v, h);
          chk(host_grant, host_req && !busy, "host_grant", f, v, h);
          chk(swap, fs && !m_frozen, "swap", f, v, h);
          m_mode = (host_req && !busy) ? MODE_HOST : busy ? (m_frozen ? MODE_FREEZE : MODE_NORMAL) : MODE_BLANK;
          checks++;
          if (mode !== m_mode) begin
            failures++; $display("FAIL mode %s expected %s", mode.name(), m_mode.name());
          end
          n_swap       += int'(swap);
          n_freeze_clk += int'(mode == MODE_FREEZE);
          n_grant      += int'(host_grant);
          n_denied     += int'(host_req && !host_grant);
          // model state update at the clock edge
          m_disp1 = m_disp;
          if (fs) begin
            if (!m_frozen) m_disp = !m_disp;
            m_frozen = freeze;
          end
          m_de2 = m_de1; m_de1 = de; m_vb_q = vblank;
          @(posedge clk); #1;
        end
    // 10 frame ends; frames 3..5 request freeze: the swaps at the ends of
    // frames 4, 5 and 6 are suppressed, leaving 7.
    checks++;
    if (n_swap != 7) begin
      failures++; $display("FAIL %0d swaps, expected 7", n_swap);
    end
    checks++;
    if (n_freeze_clk == 0 || n_grant == 0 || n_denied == 0) begin
      failures++; $display("FAIL mechanism not seen: freeze %0d grant %0d denied %0d", n_freeze_clk, n_grant, n_denied);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
