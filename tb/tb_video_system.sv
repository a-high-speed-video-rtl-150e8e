// tb_video_system: end-to-end test of the indicial-mapping video system on
// a small raster (10 x 6 active pixels, 19 clocks per line, 10 lines per
// frame, a 16 x 8 frame buffer).
//
// A camera model feeds a different, computed picture every frame.  The host
// (driving the bus as the PCI bridge would) loads a random colormap, a
// 180-degree rotation into the pointer memory, later a 2x zoom, freezes the
// picture, reads the frozen frame back out of the displayed frame buffer,
// writes a static picture into it, unfreezes, and finally switches the
// video mode to a longer line and frame.
//
// The expected output is computed from the rules alone: the colour shown at
// screen position (r, c) in frame F is LUT[pixel] where pixel is the camera
// sample of frame F-1 (or of the frozen frame, or the static picture) at
// the position the pointer memory holds for (r, c); it appears three clocks
// after the raster reaches (r, c), and blank/hsync/vsync appear with it.
// Every active pixel of every checked frame is compared.  Each mechanism
// (buffer swap, freeze, blank clocks, host grant, host waiting for
// blanking, frame-buffer read-back, static image, mode switch) is counted
// and must have happened.
module tb_video_system;
  import video_pkg::*;

  localparam int ROW_W = 3, COL_W = 4;
  localparam int HA = 10, HF = 2, HS = 3, HB = 4, HT = HA + HF + HS + HB;
  localparam int VA = 6, VF = 1, VS = 2, VB = 1, VT = VA + VF + VS + VB;
  localparam int FT = HT * VT;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] adc_data = '0;
  logic host_valid = 1'b0, host_ready, host_we = 1'b0;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic host_rvalid;
  logic [7:0] video_r, video_g, video_b;
  logic blank, csync, hsync, vsync;
  mode_e mode;
  logic disp_sel, swap;

  video_system #(
    .ROW_W(ROW_W), .COL_W(COL_W),
    .H_ACTIVE(12'(HA)), .H_FRONT(12'(HF)), .H_SYNC(12'(HS)), .H_BACK(12'(HB)),
    .V_ACTIVE(12'(VA)), .V_FRONT(12'(VF)), .V_SYNC(12'(VS)), .V_BACK(12'(VB))
  ) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ models
  function automatic logic [9:0] cam(input int f, input int r, input int c);
    return 10'((f * 97 + r * 41 + c * 13 + (r * c) * 5) ^ (f << 3));
  endfunction

  logic [23:0]    lut_m   [1024];
  logic [ROW_W+COL_W-1:0] pm_m [VA][HA];
  logic [9:0]     still_m [VA][HA];

  int  k = 0;              // clocks since reset
  int  shown = -2;         // camera frame on display, -1 static picture, -2 unknown
  bit  frozen_m = 0, freeze_m = 0;
  bit  check_en = 0, raster_fixed = 1;

  // mechanism counters
  int n_swap = 0, n_freeze = 0, n_blank = 0, n_host = 0, n_normal = 0;
  int n_wait = 0, n_readback = 0, n_still = 0, n_pix = 0, n_modeswitch = 0;

  // display checker and frame-role model
  always @(posedge clk) begin
    int kk, p, f, r, c, sr, sc;
    logic [9:0] px;
    logic [23:0] exp_rgb;
    bit act;
    if (rst_n) begin
      n_swap   += int'(swap);
      n_freeze += int'(mode == MODE_FREEZE);
      n_blank  += int'(mode == MODE_BLANK);
      n_host   += int'(mode == MODE_HOST);
      n_normal += int'(mode == MODE_NORMAL);
      if (raster_fixed) begin
        kk = k - 3;
        if (kk >= 1) begin
          p = kk % FT; f = kk / FT; r = p / HT; c = p % HT;
          act = (r < VA) && (c < HA);
          checks += 3;
          if (blank !== !act) begin failures++; $display("FAIL blank at frame %0d (%0d,%0d)", f, r, c); end
          if (hsync !== (c >= HA + HF && c < HA + HF + HS)) begin failures++; $display("FAIL hsync at (%0d,%0d)", r, c); end
          if (vsync !== (r >= VA + VF && r < VA + VF + VS)) begin failures++; $display("FAIL vsync at (%0d,%0d)", r, c); end
          if (act && check_en && shown != -2) begin
            {sr, sc} = {32'(pm_m[r][c][ROW_W+COL_W-1:COL_W]), 32'(pm_m[r][c][COL_W-1:0])};
            px = (shown == -1) ? still_m[sr][sc] : cam(shown, sr, sc);
            exp_rgb = lut_m[px];
            checks++; n_pix++;
            if ({video_r, video_g, video_b} !== exp_rgb) begin
              failures++;
              if (failures < 20)
                $display("FAIL frame %0d pixel (%0d,%0d): rgb %h expected %h (source (%0d,%0d) of %0d)",
                         f, r, c, {video_r, video_g, video_b}, exp_rgb, sr, sc, shown);
            end
          end
        end
        // first clock of vertical blanking: roles swap unless frozen
        p = k % FT;
        if (p == VA * HT) begin
          if (!frozen_m) shown = k / FT;
          frozen_m = freeze_m;
        end
      end
      // camera: the sample for the raster position of the next clock
      p = (k + 1) % FT;
      adc_data <= cam((k + 1) / FT, p / HT, p % HT);
      k++;
    end
  end

  // ------------------------------------------------------------ host
  task automatic host(input logic we, input region_e region, input int off, input logic [31:0] wd,
                      output logic [31:0] rd);
    int clocks = 0;
    host_valid = 1'b1; host_we = we; host_addr = {region, 21'(off)}; host_wdata = wd;
    while (!host_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    host_valid = 1'b0;
    while (!host_rvalid) begin @(posedge clk); #1; clocks++; end
    rd = host_rdata;
    if (region <= REG_LUT && clocks > 1) n_wait++;
    @(posedge clk); #1;
  endtask

  task automatic wr(input region_e region, input int off, input logic [31:0] wd);
    logic [31:0] dummy;
    host(1'b1, region, off, wd, dummy);
  endtask

  task automatic rd_check(input region_e region, input int off, input logic [31:0] exp, input string what);
    logic [31:0] d;
    host(1'b0, region, off, '0, d);
    checks++;
    if (d !== exp) begin
      failures++; $display("FAIL host read of %s: %h expected %h", what, d, exp);
    end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic wait_frame_start(input int line);
    // wait until the raster is at the start of the given line of a new frame
    do @(posedge clk); while ((k % FT) != line * HT);
    #1;
  endtask

  task automatic load_pm();
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++) wr(REG_PMEM, {r[ROW_W-1:0], c[COL_W-1:0]}, 32'(pm_m[r][c]));
  endtask

  initial begin
    logic [31:0] d;
    int f0;
    clocks(3);
    #1 rst_n = 1'b1;

    // colormap: random, written and mirrored
    for (int i = 0; i < 1024; i++) begin
      lut_m[i] = 24'($urandom);
      wr(REG_LUT, i, 32'(lut_m[i]));
    end
    for (int i = 0; i < 8; i++) rd_check(REG_LUT, i * 131, 32'(lut_m[i * 131]), "LUT");

    // 180-degree rotation
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++) pm_m[r][c] = {ROW_W'(VA - 1 - r), COL_W'(HA - 1 - c)};
    load_pm();
    rd_check(REG_PMEM, {3'd2, 4'd7}, 32'(pm_m[2][7]), "pointer memory");
    wait_frame_start(0);
    check_en = 1;
    clocks(4 * FT);

    // 2x zoom of the top-left quarter
    check_en = 0;
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++) pm_m[r][c] = {ROW_W'(r / 2), COL_W'(c / 2)};
    load_pm();
    wait_frame_start(0);
    check_en = 1;
    clocks(3 * FT);

    // freeze: request in mid frame, effective from the next frame start
    wait_frame_start(1);
    wr(REG_MODE, VR_CTRL, 32'd1);
    freeze_m = 1;
    clocks(4 * FT);
    #1;
    // frame-grab: read the frozen frame back out of the displayed buffer
    host(1'b0, REG_MODE, VR_STATUS, '0, d);
    checks++;
    if (d[1] !== 1'b1 || d[0] !== disp_sel) begin
      failures++; $display("FAIL status %h with display select %0b", d, disp_sel);
    end
    f0 = shown;
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c += 3) begin
        rd_check(d[0] ? REG_VRAM2 : REG_VRAM1, {r[ROW_W-1:0], c[COL_W-1:0]}, 32'(cam(f0, r, c)), "frozen frame");
        n_readback++;
      end
    // static picture into the displayed buffer
    check_en = 0;
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++) begin
        still_m[r][c] = 10'(r * 150 + c * 61);
        wr(d[0] ? REG_VRAM2 : REG_VRAM1, {r[ROW_W-1:0], c[COL_W-1:0]}, 32'(still_m[r][c]));
      end
    shown = -1;
    wait_frame_start(0);
    check_en = 1;
    clocks(3 * FT);
    n_still = 3;

    // back to normal operation
    wait_frame_start(1);
    wr(REG_MODE, VR_CTRL, 32'd0);
    freeze_m = 0;
    clocks(4 * FT);

    // mode switch: longer back porch and front porch
    check_en = 0;
    wait_frame_start(1);
    raster_fixed = 0;
    wr(REG_MODE, VR_H_BACK, 32'(HB + 4));
    wr(REG_MODE, VR_V_FRONT, 32'(VF + 2));
    rd_check(REG_MODE, VR_H_BACK, 32'(HB + 4), "back porch register");
    begin
      int t0, t1, n_act;
      logic q;
      // skip three frames for the new timing to settle, then measure
      clocks(3 * (HT + 4) * (VT + 2));
      // line length: clocks between two hsync rises
      q = 1'b1;
      forever begin @(posedge clk); if (hsync && !q) break; q = hsync; end
      t0 = k; q = 1'b1;
      forever begin @(posedge clk); if (hsync && !q) break; q = hsync; end
      t1 = k;
      checks++;
      if (t1 - t0 != HT + 4) begin
        failures++; $display("FAIL line length %0d clocks after mode switch, expected %0d", t1 - t0, HT + 4);
      end
      // frame length: clocks between two vsync rises, and active clocks in it
      q = 1'b1;
      forever begin @(posedge clk); if (vsync && !q) break; q = vsync; end
      t0 = k; q = 1'b1; n_act = 0;
      forever begin
        @(posedge clk);
        if (vsync && !q) break;
        q = vsync;
        n_act += int'(!blank);
      end
      t1 = k;
      checks += 2;
      if (t1 - t0 != (HT + 4) * (VT + 2)) begin
        failures++; $display("FAIL frame length %0d clocks, expected %0d", t1 - t0, (HT + 4) * (VT + 2));
      end
      if (n_act != HA * VA) begin
        failures++; $display("FAIL %0d active clocks per frame, expected %0d", n_act, HA * VA);
      end
      n_modeswitch++;
    end

    $display("mechanisms: swaps %0d, freeze clocks %0d, blank clocks %0d, host-grant clocks %0d, normal clocks %0d,",
             n_swap, n_freeze, n_blank, n_host, n_normal);
    $display("            host waits for blanking %0d, frame read-backs %0d, static frames %0d, mode switches %0d, pixels checked %0d",
             n_wait, n_readback, n_still, n_modeswitch, n_pix);
    checks++;
    if (n_swap == 0 || n_freeze == 0 || n_blank == 0 || n_host == 0 || n_normal == 0 || n_wait == 0 ||
        n_readback == 0 || n_still == 0 || n_modeswitch == 0 || n_pix < 10 * HA * VA) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
