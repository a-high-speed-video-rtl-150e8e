// video_mode_regs: host-programmable video mode and operating mode.
//
// Holds the timing of the video standard in use: pixels per active line,
// front porch, sync tip and back porch in pixel clocks, and the same four
// lengths for the frame in lines.  The sync generator reads them
// continuously, so the board can be switched to another standard from the
// host.  A control register selects freeze-frame mode (bit 0); a status
// register, read only, reports which frame buffer is on display and whether
// freeze is in force.
//
// Interface: a register is written on a clock with wr high; rd_addr selects
// the word returned on rdata in the next clock.  Register numbers are in
// video_pkg.  Reset loads the parameters, whose defaults make a 525-line
// NTSC-like raster of 762 pixel clocks per line (63.5 us at 12 MHz, with 106
// clocks, about 14 %, of blanking and 480 active lines).  The split of the
// blanking into porches and sync and the vertical porch lengths are this
// design's choice.
module video_mode_regs
  import video_pkg::*;
#(
  parameter logic [TIM_W-1:0] H_ACTIVE = 12'd656,
  parameter logic [TIM_W-1:0] H_FRONT  = 12'd16,
  parameter logic [TIM_W-1:0] H_SYNC   = 12'd56,
  parameter logic [TIM_W-1:0] H_BACK   = 12'd34,
  parameter logic [TIM_W-1:0] V_ACTIVE = 12'd480,
  parameter logic [TIM_W-1:0] V_FRONT  = 12'd10,
  parameter logic [TIM_W-1:0] V_SYNC   = 12'd6,
  parameter logic [TIM_W-1:0] V_BACK   = 12'd29
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [3:0]  wr_addr,
  input  logic [15:0] wdata,
  input  logic [3:0]  rd_addr,
  output logic [15:0] rdata,
  input  logic [1:0]  status,   // {freeze in force, displayed buffer}
  output timing_t     tim,
  output logic        freeze
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tim.h_active <= H_ACTIVE;
      tim.h_front  <= H_FRONT;
      tim.h_sync   <= H_SYNC;
      tim.h_back   <= H_BACK;
      tim.v_active <= V_ACTIVE;
      tim.v_front  <= V_FRONT;
      tim.v_sync   <= V_SYNC;
      tim.v_back   <= V_BACK;
      freeze       <= 1'b0;
    end else if (wr) begin
      case (wr_addr)
        VR_CTRL:     freeze       <= wdata[0];
        VR_H_ACTIVE: tim.h_active <= wdata[TIM_W-1:0];
        VR_H_FRONT:  tim.h_front  <= wdata[TIM_W-1:0];
        VR_H_SYNC:   tim.h_sync   <= wdata[TIM_W-1:0];
        VR_H_BACK:   tim.h_back   <= wdata[TIM_W-1:0];
        VR_V_ACTIVE: tim.v_active <= wdata[TIM_W-1:0];
        VR_V_FRONT:  tim.v_front  <= wdata[TIM_W-1:0];
        VR_V_SYNC:   tim.v_sync   <= wdata[TIM_W-1:0];
        VR_V_BACK:   tim.v_back   <= wdata[TIM_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else begin
      case (rd_addr)
        VR_CTRL:     rdata <= {15'd0, freeze};
        VR_H_ACTIVE: rdata <= 16'(tim.h_active);
        VR_H_FRONT:  rdata <= 16'(tim.h_front);
        VR_H_SYNC:   rdata <= 16'(tim.h_sync);
        VR_H_BACK:   rdata <= 16'(tim.h_back);
        VR_V_ACTIVE: rdata <= 16'(tim.v_active);
        VR_V_FRONT:  rdata <= 16'(tim.v_front);
        VR_V_SYNC:   rdata <= 16'(tim.v_sync);
        VR_V_BACK:   rdata <= 16'(tim.v_back);
        VR_STATUS:   rdata <= {14'd0, status};
        default:     rdata <= '0;
      endcase
    end
  end

endmodule
