// video_pkg: types and constants shared by the indicial-mapping video system.
//
// The system keeps pixel coordinates as ordered pairs (row, column), the way
// the pointer memory stores them: an address into a frame buffer is the
// concatenation {row, col}.  A row field of ROW_W bits and a column field of
// COL_W bits give a 2**(ROW_W+COL_W) word frame buffer; the active picture
// occupies the top-left corner of that space.
//
// The host (the local side of the PCI bridge) sees one word-addressed space
// split into regions by its top address bits; the region codes and the video
// mode register numbers below are this design's own choice.
package video_pkg;

  // Widths of the timing fields held in the video mode registers.
  localparam int unsigned TIM_W = 12;

  // Line and frame timing as held by the video mode registers.  Each line is
  // active video, front porch, sync tip and back porch in that order
  // (horizontal in pixel clocks, vertical in lines).
  typedef struct packed {
    logic [TIM_W-1:0] h_active;
    logic [TIM_W-1:0] h_front;
    logic [TIM_W-1:0] h_sync;
    logic [TIM_W-1:0] h_back;
    logic [TIM_W-1:0] v_active;
    logic [TIM_W-1:0] v_front;
    logic [TIM_W-1:0] v_sync;
    logic [TIM_W-1:0] v_back;
  } timing_t;

  // One colour out of the lookup table.
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // What the controller is doing in the current clock.
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,   // one buffer written from the camera, the other displayed
    MODE_FREEZE = 2'd1,   // displayed buffer read, nothing written
    MODE_BLANK  = 2'd2,   // blanking: no video access to any memory
    MODE_HOST   = 2'd3    // blanking cycle in which the host owns the memories
  } mode_e;

  // Host address map: host_addr[HOST_AW-1 -: 3] selects the region.
  localparam int unsigned HOST_AW = 24;
  typedef enum logic [2:0] {
    REG_VRAM1 = 3'd0,
    REG_VRAM2 = 3'd1,
    REG_PMEM  = 3'd2,
    REG_LUT   = 3'd3,
    REG_MODE  = 3'd4
  } region_e;

  // Video mode register numbers (word offsets inside REG_MODE).
  localparam logic [3:0] VR_CTRL     = 4'd0;  // bit 0: freeze frame
  localparam logic [3:0] VR_H_ACTIVE = 4'd1;
  localparam logic [3:0] VR_H_FRONT  = 4'd2;
  localparam logic [3:0] VR_H_SYNC   = 4'd3;
  localparam logic [3:0] VR_H_BACK   = 4'd4;
  localparam logic [3:0] VR_V_ACTIVE = 4'd5;
  localparam logic [3:0] VR_V_FRONT  = 4'd6;
  localparam logic [3:0] VR_V_SYNC   = 4'd7;
  localparam logic [3:0] VR_V_BACK   = 4'd8;
  localparam logic [3:0] VR_STATUS   = 4'd9;  // read only: bit 0 displayed buffer, bit 1 freeze in force

endpackage
