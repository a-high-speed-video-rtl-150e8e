// tb_video_system_full: one complete operation of the video system at its
// default size: a 656 x 480 picture in a 762-clock, 525-line raster, with
// 1024 x 1024 frame buffers and pointer memory.
//
// The host loads an inverted grey-scale colormap and a 180-degree rotation
// of the full picture into the pointer memory (314,880 words, written only
// in blanking clocks, which takes about eleven frames).  A camera model
// supplies a computed picture that changes every frame.  Two complete
// frames are then compared, pixel by pixel, with what the rules predict:
// screen position (r, c) shows colormap[camera(F-1, 479-r, 655-c)], three
// clocks after the raster reaches it, and blank/hsync/vsync match the
// programmed timing.  Line and frame lengths are counted on the outputs.
module tb_video_system_full;
  import video_pkg::*;

  localparam int HA = 656, HF = 16, HS = 56, HB = 34, HT = HA + HF + HS + HB;
  localparam int VA = 480, VF = 10, VS = 6, VB = 29, VT = VA + VF + VS + VB;
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

  video_system dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20 * FT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] cam(input int f, input int r, input int c);
    return 10'((f * 97 + r * 41 + c * 13 + (r * c) * 5) ^ (f << 3));
  endfunction

  function automatic logic [23:0] cmap(input logic [9:0] px);
    logic [7:0] v;
    v = 8'(255 - int'(px) / 4);
    return {v, v, v};
  endfunction

  int  k = 0;
  int  shown = -2;
  bit  check_en = 0;
  int  n_pix = 0, n_swap = 0, n_blank_clk = 0, n_host_clk = 0, n_line_hs = 0;

  always @(posedge clk) begin
    int kk, p, f, r, c;
    bit act;
    if (rst_n) begin
      n_swap      += int'(swap);
      n_blank_clk += int'(mode == MODE_BLANK);
      n_host_clk  += int'(mode == MODE_HOST);
      kk = k - 3;
      if (kk >= 1) begin
        p = kk % FT; f = kk / FT; r = p / HT; c = p % HT;
        act = (r < VA) && (c < HA);
        if (check_en) begin
          checks += 3;
          if (blank !== !act) begin failures++; $display("FAIL blank at (%0d,%0d)", r, c); end
          if (hsync !== (c >= HA + HF && c < HA + HF + HS)) begin failures++; $display("FAIL hsync at (%0d,%0d)", r, c); end
          if (vsync !== (r >= VA + VF && r < VA + VF + VS)) begin failures++; $display("FAIL vsync at (%0d,%0d)", r, c); end
          n_line_hs += int'(hsync && c == HA + HF);
          if (act) begin
            checks++; n_pix++;
            if ({video_r, video_g, video_b} !== cmap(cam(shown, VA - 1 - r, HA - 1 - c))) begin
              failures++;
              if (failures < 20)
                $display("FAIL frame %0d pixel (%0d,%0d): %h expected %h", f, r, c,
                         {video_r, video_g, video_b}, cmap(cam(shown, VA - 1 - r, HA - 1 - c)));
            end
          end
        end
      end
      p = k % FT;
      if (p == VA * HT) shown = k / FT;
      p = (k + 1) % FT;
      adc_data <= cam((k + 1) / FT, p / HT, p % HT);
      k++;
    end
  end

  task automatic wr(input region_e region, input int off, input logic [31:0] wd);
    host_valid = 1'b1; host_we = 1'b1; host_addr = {region, 21'(off)}; host_wdata = wd;
    while (!host_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    host_valid = 1'b0;
    while (!host_rvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  initial begin
    int t_prog;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1024; i++) wr(REG_LUT, i, 32'(cmap(10'(i))));
    for (int r = 0; r < VA; r++)
      for (int c = 0; c < HA; c++) wr(REG_PMEM, {10'(r), 10'(c)}, 32'({10'(VA - 1 - r), 10'(HA - 1 - c)}));
    t_prog = k;
    $display("colormap and pointer memory loaded after %0d clocks (%0d frames)", t_prog, t_prog / FT);
    // start checking at the next frame start, once a complete camera frame
    // has been captured under the new mapping
    do @(posedge clk); while ((k % FT) != 0);
    #1;
    check_en = 1;
    repeat (2 * FT) @(posedge clk);
    #1;
    check_en = 0;
    checks++;
    if (n_pix != 2 * HA * VA) begin
      failures++; $display("FAIL %0d pixels checked, expected %0d", n_pix, 2 * HA * VA);
    end
    checks++;
    if (n_line_hs != 2 * VT || n_swap < 12 || n_blank_clk == 0 || n_host_clk == 0) begin
      failures++; $display("FAIL hsync lines %0d, swaps %0d, blank %0d, host %0d", n_line_hs, n_swap, n_blank_clk, n_host_clk);
    end
    $display("pixels checked %0d, swaps %0d, host-grant clocks %0d", n_pix, n_swap, n_host_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
