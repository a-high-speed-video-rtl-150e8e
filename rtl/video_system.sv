// video_system: real-time geometric transformation of live video by
// indicial mapping.
//
// Camera samples (10 bits from the A/D converter) are stored in one of two
// frame buffers at the raster address {row, col} while the other frame
// buffer is displayed.  The displayed buffer is not read in raster order:
// a pointer memory, scanned in raster order by the same address generator,
// supplies for each screen position the {row, col} of the source pixel.
// Whatever pattern the host loads into the pointer memory (rotation,
// translation, zoom, any remapping) is applied to every frame at video rate.
// The pixel read out addresses a lookup table that turns it into 24-bit
// RGB for the video DAC, together with blank and sync from the sync
// generator.  The two buffers swap roles every frame, so the output is one
// frame behind the camera; freeze-frame mode stops capture.  A host bus
// (the local side of a PCI bridge) reaches every memory and the video mode
// registers through the address decoder, in blanking clocks only.
//
// Pipeline (clock of de = stage 0):
//   stage 0  address generator -> pointer memory read, capture write
//   stage 1  pointer word      -> displayed frame buffer read
//   stage 2  pixel             -> lookup table read
//   stage 3  RGB on video_r/g/b; blank/sync delayed three clocks to match
// adc_data is sampled in stage 0: the camera is taken to run on this
// raster's timing.  hsync, vsync, csync and blank are active high.
//
// The block structure, the data widths (10-bit pixels, 8-bit colours), the
// two swapped buffers, the shared address generator, the modes and the host
// access paths follow the document.  Memory depths, the pipeline, the host
// bus and its address map, register layout and the default timing are this
// design's choice.
module video_system
  import video_pkg::*;
#(
  parameter int unsigned ROW_W = 10,
  parameter int unsigned COL_W = 10,
  parameter logic [TIM_W-1:0] H_ACTIVE = 12'd656,
  parameter logic [TIM_W-1:0] H_FRONT  = 12'd16,
  parameter logic [TIM_W-1:0] H_SYNC   = 12'd56,
  parameter logic [TIM_W-1:0] H_BACK   = 12'd34,
  parameter logic [TIM_W-1:0] V_ACTIVE = 12'd480,
  parameter logic [TIM_W-1:0] V_FRONT  = 12'd10,
  parameter logic [TIM_W-1:0] V_SYNC   = 12'd6,
  parameter logic [TIM_W-1:0] V_BACK   = 12'd29
) (
  input  logic               clk,          // pixel clock
  input  logic               rst_n,
  // from the A/D converter
  input  logic [9:0]         adc_data,
  // host local bus (PCI bridge side)
  input  logic               host_valid,
  output logic               host_ready,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [31:0]        host_wdata,
  output logic               host_rvalid,
  output logic [31:0]        host_rdata,
  // to the video DAC
  output logic [7:0]         video_r,
  output logic [7:0]         video_g,
  output logic [7:0]         video_b,
  output logic               blank,
  output logic               csync,
  output logic               hsync,
  output logic               vsync,
  // operating state, for observation
  output mode_e              mode,
  output logic               disp_sel,
  output logic               swap
);

  localparam int unsigned AW = ROW_W + COL_W;

  // ---------------------------------------------------------------- timing
  timing_t tim;
  logic    freeze, frozen;
  logic    de, hblank, vblank, hs0, vs0, blank0, cs0;

  sync_generator u_sync (
    .clk, .rst_n, .tim,
    .de, .hblank, .vblank, .hsync(hs0), .vsync(vs0), .blank(blank0), .csync(cs0)
  );

  logic [AW-1:0] vaddr;
  logic          vaddr_valid;

  address_generator #(.ROW_W(ROW_W), .COL_W(COL_W)) u_agen (
    .clk, .rst_n, .de, .vblank, .addr(vaddr), .addr_valid(vaddr_valid)
  );

  // ------------------------------------------------------------ host side
  logic          mem_req, mem_grant;
  logic          h_vram1, h_vram2, h_pm, h_lut, h_we;
  logic [AW-1:0] h_addr;
  logic [9:0]    h_lut_addr;
  logic [31:0]   h_wdata;
  logic          reg_wr;
  logic [3:0]    reg_addr;
  logic [15:0]   reg_wdata, reg_rdata;
  logic [9:0]    fb1_rdata, fb2_rdata;
  logic [AW-1:0] pm_rdata;
  rgb_t          lut_rgb;

  address_decoder #(.MAW(AW), .PDW(AW)) u_dec (
    .clk, .rst_n,
    .host_valid, .host_ready, .host_we, .host_addr, .host_wdata,
    .host_rvalid, .host_rdata,
    .mem_req, .mem_grant,
    .vram1_en(h_vram1), .vram2_en(h_vram2), .pm_en(h_pm), .lut_en(h_lut),
    .m_we(h_we), .m_addr(h_addr), .m_lut_addr(h_lut_addr), .m_wdata(h_wdata),
    .vram1_rdata(fb1_rdata), .vram2_rdata(fb2_rdata), .pm_rdata,
    .lut_rdata(lut_rgb),
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata
  );

  video_mode_regs #(
    .H_ACTIVE(H_ACTIVE), .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK),
    .V_ACTIVE(V_ACTIVE), .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK)
  ) u_regs (
    .clk, .rst_n,
    .wr(reg_wr), .wr_addr(reg_addr), .wdata(reg_wdata),
    .rd_addr(reg_addr), .rdata(reg_rdata),
    .status({frozen, disp_sel}), .tim, .freeze
  );

  // ----------------------------------------------------------- controller
  logic pm_rd, wr_en, wr_buf, rd_en, rd_buf, lut_rd;

  controller u_ctrl (
    .clk, .rst_n, .de, .vblank, .freeze,
    .host_req(mem_req), .host_grant(mem_grant),
    .pm_rd, .wr_en, .wr_buf, .rd_en, .rd_buf, .lut_rd,
    .disp_sel, .frozen, .swap, .mode
  );

  // ------------------------------------------------- memory port selection
  // In a host-granted clock no video stage is active, so the host enable
  // alone chooses the source of each memory's port.
  logic          pm_en, pm_we;
  logic [AW-1:0] pm_addr;
  logic [AW-1:0] pm_wdata;

  always_comb begin
    if (h_pm) begin
      pm_en = 1'b1;  pm_we = h_we;  pm_addr = h_addr;  pm_wdata = h_wdata[AW-1:0];
    end else begin
      pm_en = pm_rd; pm_we = 1'b0;  pm_addr = vaddr;   pm_wdata = '0;
    end
  end

  pointer_memory #(.AW(AW), .DW(AW)) u_pm (
    .clk, .en(pm_en), .we(pm_we), .addr(pm_addr), .wdata(pm_wdata), .rdata(pm_rdata)
  );

  // Frame buffer b (0 = VRAM 1, 1 = VRAM 2): host, capture write or display read.
  logic          fb_en    [2];
  logic          fb_we    [2];
  logic [AW-1:0] fb_addr  [2];
  logic [9:0]    fb_wdata [2];
  logic          h_fb     [2];

  assign h_fb[0] = h_vram1;
  assign h_fb[1] = h_vram2;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (h_fb[b]) begin
        fb_en[b] = 1'b1;  fb_we[b] = h_we;  fb_addr[b] = h_addr;  fb_wdata[b] = h_wdata[9:0];
      end else if (wr_en && (wr_buf == b[0])) begin
        fb_en[b] = 1'b1;  fb_we[b] = 1'b1;  fb_addr[b] = vaddr;   fb_wdata[b] = adc_data;
      end else begin
        fb_en[b] = rd_en && (rd_buf == b[0]);
        fb_we[b] = 1'b0;  fb_addr[b] = pm_rdata;  fb_wdata[b] = '0;
      end
    end
  end

  frame_buffer #(.AW(AW), .DW(10)) u_vram1 (
    .clk, .en(fb_en[0]), .we(fb_we[0]), .addr(fb_addr[0]), .wdata(fb_wdata[0]), .rdata(fb1_rdata)
  );
  frame_buffer #(.AW(AW), .DW(10)) u_vram2 (
    .clk, .en(fb_en[1]), .we(fb_we[1]), .addr(fb_addr[1]), .wdata(fb_wdata[1]), .rdata(fb2_rdata)
  );

  // Stage 2: the pixel from whichever buffer was read addresses the LUT.
  logic       rd_buf_s2;
  logic [9:0] pixel;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_buf_s2 <= 1'b0;
    else        rd_buf_s2 <= rd_buf;
  end
  assign pixel = rd_buf_s2 ? fb2_rdata : fb1_rdata;

  logic       lut_en, lut_we;
  logic [9:0] lut_addr;
  always_comb begin
    if (h_lut) begin
      lut_en = 1'b1;   lut_we = h_we;  lut_addr = h_lut_addr;
    end else begin
      lut_en = lut_rd; lut_we = 1'b0;  lut_addr = pixel;
    end
  end

  lookup_table #(.AW(10)) u_lut (
    .clk, .en(lut_en), .we(lut_we), .addr(lut_addr), .wdata(rgb_t'(h_wdata[23:0])), .rgb(lut_rgb)
  );

  assign video_r = lut_rgb.r;
  assign video_g = lut_rgb.g;
  assign video_b = lut_rgb.b;

  // ------------------------------------- blank/sync aligned with the colour
  logic [3:0] sync_pipe [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) sync_pipe[i] <= 4'b0001;   // {csync, vsync, hsync, blank}
    end else begin
      sync_pipe[0] <= {cs0, vs0, hs0, blank0};
      sync_pipe[1] <= sync_pipe[0];
      sync_pipe[2] <= sync_pipe[1];
    end
  end
  assign {csync, vsync, hsync, blank} = sync_pipe[2];

  logic unused;
  assign unused = ^{hblank, vaddr_valid, h_wdata[31:24]};

endmodule
