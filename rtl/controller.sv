// controller: operating modes and frame-buffer role swapping.
//
// The video path is a three-clock pipeline: in stage 0 the address
// generator's address reads the pointer memory and writes the camera sample
// into the capture buffer; in stage 1 the pointer word reads the displayed
// buffer; in stage 2 that pixel reads the lookup table.  The controller
// decides, for every clock, what each memory does:
//
//   normal  - the capture buffer is written with the camera sample while the
//             other buffer is displayed; the roles swap at the start of
//             every vertical blanking, so the picture is one frame late.
//   freeze  - nothing is written and the displayed buffer is read over and
//             over.  Freeze requests are taken at the start of vertical
//             blanking; the frame that has just been captured is swapped in
//             first, so freezing shows the latest complete frame.
//   blank   - no stage of the pipeline is active: no video access to any
//             memory.  These clocks are the only ones in which the host is
//             granted the memories (host mode), so host traffic never
//             disturbs the picture; a host request waits for blanking.
//
// disp_sel = 0 means VRAM 1 is displayed and VRAM 2 captures.  Outputs are
// combinational from registers and the de input of the same clock.  The
// three modes and the role swap follow the document; the swap instant, the
// freeze hand-over and the rule that the host waits for blanking are this
// design's choice.
module controller
  import video_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  de,          // stage 0 active pixel
  input  logic  vblank,      // vertical blanking from the sync generator
  input  logic  freeze,      // freeze-frame request from the mode register
  input  logic  host_req,    // host wants a memory access
  output logic  host_grant,  // host owns the memories this clock
  output logic  pm_rd,       // stage 0: read pointer memory
  output logic  wr_en,       // stage 0: write capture buffer
  output logic  wr_buf,      // stage 0: which buffer captures (0 = VRAM 1)
  output logic  rd_en,       // stage 1: read displayed buffer
  output logic  rd_buf,      // stage 1: which buffer is read
  output logic  lut_rd,      // stage 2: read lookup table
  output logic  disp_sel,    // buffer on display
  output logic  frozen,      // freeze in force
  output logic  swap,        // pulse: roles swapped this clock
  output mode_e mode
);

  logic vblank_q, de_s1, de_s2, disp_s1;
  logic frame_start;

  assign frame_start = vblank && !vblank_q;   // first clock of vertical blanking

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vblank_q <= 1'b0;
      de_s1    <= 1'b0;
      de_s2    <= 1'b0;
      disp_s1  <= 1'b0;
      disp_sel <= 1'b0;
      frozen   <= 1'b0;
    end else begin
      vblank_q <= vblank;
      de_s1    <= de;
      de_s2    <= de_s1;
      disp_s1  <= disp_sel;
      if (frame_start) begin
        if (!frozen) disp_sel <= !disp_sel;
        frozen <= freeze;
      end
    end
  end

  logic video_busy;
  assign video_busy = de || de_s1 || de_s2;

  assign swap       = frame_start && !frozen;
  assign pm_rd      = de;
  assign wr_en      = de && !frozen;
  assign wr_buf     = !disp_sel;
  assign rd_en      = de_s1;
  assign rd_buf     = disp_s1;
  assign lut_rd     = de_s2;
  assign host_grant = host_req && !video_busy;

  always_comb begin
    if (host_grant)      mode = MODE_HOST;
    else if (video_busy) mode = frozen ? MODE_FREEZE : MODE_NORMAL;
    else                 mode = MODE_BLANK;
  end

  // The host may never share a clock with video traffic.
  a_host_excl: assert property (@(posedge clk) disable iff (!rst_n)
    host_grant |-> !(pm_rd || wr_en || rd_en || lut_rd));
  // The capture buffer is never the one being displayed.
  a_roles: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && rd_en) |-> (wr_buf != rd_buf));

endmodule
