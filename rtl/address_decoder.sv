// address_decoder: routes host (PCI) accesses to the board's memories and
// to the video mode registers.
//
// The host side is the local bus of the PCI bridge, modelled as a
// valid/ready request channel and a response strobe.  A request is taken
// when host_valid and host_ready are both high; the top three address bits
// select the region (VRAM 1, VRAM 2, pointer memory, lookup table, video
// mode registers; see video_pkg) and the rest are the word offset.
//
//   IDLE  ready; take a request.
//   WAIT  register region: access the register now.
//         memory region: raise mem_req and wait for the controller's grant,
//         which comes only in a blanking clock; in the granted clock drive
//         the selected memory's port.  Unused regions do nothing.
//   RESP  one clock of host_rvalid with the read data (writes answer too,
//         with undefined data), then back to IDLE.
//
// A register access takes 3 clocks from acceptance to response; a memory
// access 3 clocks plus the wait for blanking.  Data widths: frame buffers
// 10 bits, pointer memory {row, col}, lookup table {R, G, B} in bits 23:0,
// registers 16 bits; unused high bits read as 0.  That the decoder uses the
// high address bits to pick memories and registers follows the document;
// the map, the bus protocol and the timing are this design's choice.
module address_decoder
  import video_pkg::*;
#(
  parameter int unsigned MAW = 20,   // memory word address width ({row, col})
  parameter int unsigned PDW = 20    // pointer memory data width
) (
  input  logic               clk,
  input  logic               rst_n,
  // host local bus
  input  logic               host_valid,
  output logic               host_ready,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [31:0]        host_wdata,
  output logic               host_rvalid,
  output logic [31:0]        host_rdata,
  // arbitration with the controller
  output logic               mem_req,
  input  logic               mem_grant,
  // shared host-side memory port
  output logic               vram1_en,
  output logic               vram2_en,
  output logic               pm_en,
  output logic               lut_en,
  output logic               m_we,
  output logic [MAW-1:0]     m_addr,
  output logic [9:0]         m_lut_addr,
  output logic [31:0]        m_wdata,
  input  logic [9:0]         vram1_rdata,
  input  logic [9:0]         vram2_rdata,
  input  logic [PDW-1:0]     pm_rdata,
  input  rgb_t               lut_rdata,
  // video mode registers
  output logic               reg_wr,
  output logic [3:0]         reg_addr,
  output logic [15:0]        reg_wdata,
  input  logic [15:0]        reg_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RESP} state_e;
  state_e state;

  logic               q_we;
  logic [HOST_AW-1:0] q_addr;
  logic [31:0]        q_wdata;
  region_e            region;
  logic               is_mem;

  assign region = region_e'(q_addr[HOST_AW-1 -: 3]);
  assign is_mem = (region == REG_VRAM1) || (region == REG_VRAM2) ||
                  (region == REG_PMEM)  || (region == REG_LUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      q_we    <= 1'b0;
      q_addr  <= '0;
      q_wdata <= '0;
    end else begin
      case (state)
        S_IDLE: if (host_valid) begin
          q_we    <= host_we;
          q_addr  <= host_addr;
          q_wdata <= host_wdata;
          state   <= S_WAIT;
        end
        S_WAIT: if (!is_mem || mem_grant) state <= S_RESP;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign host_ready = (state == S_IDLE);
  assign mem_req    = (state == S_WAIT) && is_mem;

  logic go;
  assign go       = (state == S_WAIT) && is_mem && mem_grant;
  assign vram1_en = go && (region == REG_VRAM1);
  assign vram2_en = go && (region == REG_VRAM2);
  assign pm_en    = go && (region == REG_PMEM);
  assign lut_en   = go && (region == REG_LUT);
  assign m_we     = q_we;
  assign m_addr   = q_addr[MAW-1:0];
  assign m_lut_addr = q_addr[9:0];
  assign m_wdata  = q_wdata;

  assign reg_wr    = (state == S_WAIT) && (region == REG_MODE) && q_we;
  assign reg_addr  = q_addr[3:0];
  assign reg_wdata = q_wdata[15:0];

  assign host_rvalid = (state == S_RESP);
  always_comb begin
    host_rdata = '0;
    if (state == S_RESP && !q_we) begin
      case (region)
        REG_VRAM1: host_rdata = 32'(vram1_rdata);
        REG_VRAM2: host_rdata = 32'(vram2_rdata);
        REG_PMEM:  host_rdata = 32'(pm_rdata);
        REG_LUT:   host_rdata = 32'(lut_rdata);
        REG_MODE:  host_rdata = 32'(reg_rdata);
        default:   host_rdata = '0;
      endcase
    end
  end

  // Host side rule: a request is held, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (host_valid && !host_ready) |=> (host_valid && $stable(host_addr) && $stable(host_we)));

endmodule
