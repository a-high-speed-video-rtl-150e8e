// tb_figure_examples: the 4 x 4 worked examples of indicial mapping and of
// the colormap, run through the whole video system.
//
// Mapping example: the frame buffer holds a "T" (top row and column 1
// black, the rest white) and the pointer memory holds, at (r, c), the pair
// (3 - r, c).  The display must show the T upside down: bottom row and
// column 1 black.
//
// Colormap example: four grey levels are loaded into the lookup table
// (0 black, 1 dark grey, 2 light grey, 3 white; the shades 00, 55, AA, FF
// are this testbench's choice).  With the same pointer pattern, the camera
// picture is chosen so that the displayed brightness values are
//     3 1 3 3 / 3 2 3 3 / 3 2 3 3 / 0 1 1 0
// and each screen pixel must show the grey of its value in R, G and B.
//
// The camera feeds the picture every frame; three complete frames of each
// example are compared pixel by pixel.
module tb_figure_examples;
  import video_pkg::*;

  localparam int ROW_W = 2, COL_W = 2;
  localparam int HA = 4, HF = 1, HS = 1, HB = 3, HT = HA + HF + HS + HB;
  localparam int VA = 4, VF = 1, VS = 1, VB = 1, VT = VA + VF + VS + VB;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pictures, indexed [row][col]
  localparam logic [1:0] BRIGHT [4][4] = '{'{3, 1, 3, 3}, '{3, 2, 3, 3}, '{3, 2, 3, 3}, '{0, 1, 1, 0}};
  localparam logic [7:0] GREY [4] = '{8'h00, 8'h55, 8'hAA, 8'hFF};

  logic [9:0] camera   [4][4];   // picture the camera delivers
  logic [23:0] expect_rgb [4][4]; // what the screen must show
  int k = 0, n_pix = 0;
  bit check_en = 0;

  always @(posedge clk) begin
    int kk, p, r, c;
    if (rst_n) begin
      kk = k - 3;
      if (kk >= 1 && check_en) begin
        p = kk % FT; r = p / HT; c = p % HT;
        if (r < VA && c < HA) begin
          checks++; n_pix++;
          if ({video_r, video_g, video_b} !== expect_rgb[r][c]) begin
            failures++;
            $display("FAIL pixel (%0d,%0d): %h expected %h", r, c, {video_r, video_g, video_b}, expect_rgb[r][c]);
          end
        end
      end
      p = (k + 1) % FT;
      adc_data <= ((p / HT) < VA && (p % HT) < HA) ? camera[p / HT][p % HT] : 10'd0;
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

  task automatic check_frames(input int n);
    do @(posedge clk); while ((k % FT) != 0);
    #1;
    check_en = 1;
    repeat (n * FT) @(posedge clk);
    #1;
    check_en = 0;
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // pointer pattern of the mapping example: (r, c) holds (3 - r, c)
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) wr(REG_PMEM, {2'(r), 2'(c)}, 32'({2'(3 - r), 2'(c)}));

    // --- mapping example: a "T" in, upside-down "T" out
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        camera[r][c] = (r == 0 || c == 1) ? 10'd0 : 10'd1023;                 // black T on white
        expect_rgb[r][c] = (r == 3 || c == 1) ? 24'h000000 : 24'hFFFFFF;     // entry 1023 = FF
      end
    for (int i = 0; i < 1024; i++) wr(REG_LUT, i, 32'({3{8'(i / 4)}}));
    repeat (3 * FT) @(posedge clk);
    #1;
    n0 = n_pix;
    check_frames(3);
    checks++;
    if (n_pix - n0 != 3 * 16) begin failures++; $display("FAIL mapping example: %0d pixels", n_pix - n0); end

    // --- colormap example: four grey levels
    for (int i = 0; i < 4; i++) wr(REG_LUT, i, 32'({3{GREY[i]}}));
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        camera[3 - r][c] = 10'(BRIGHT[r][c]);
        expect_rgb[r][c] = {3{GREY[BRIGHT[r][c]]}};
      end
    repeat (3 * FT) @(posedge clk);
    #1;
    n0 = n_pix;
    check_frames(3);
    checks++;
    if (n_pix - n0 != 3 * 16) begin failures++; $display("FAIL colormap example: %0d pixels", n_pix - n0); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
