// tb_address_decoder: checks host access routing.
//
// The testbench plays host, controller and memories: small memory models
// with one clock of read latency answer on the decoder's memory port, and
// the grant is withheld at random to stand for active video.  Random reads
// and writes to all five regions (and to an unused one) are issued; every
// memory access must be performed exactly once, in a granted clock, on the
// right memory only, and every read must return the model's word.  Register
// accesses must not wait for a grant and must take 3 clocks.
module tb_address_decoder;
  import video_pkg::*;
  localparam int MAW = 6, PDW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_valid = 1'b0, host_ready, host_we = 1'b0;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic host_rvalid;
  logic mem_req, mem_grant;
  logic vram1_en, vram2_en, pm_en, lut_en, m_we;
  logic [MAW-1:0] m_addr;
  logic [9:0] m_lut_addr;
  logic [31:0] m_wdata;
  logic [9:0] vram1_rdata, vram2_rdata;
  logic [PDW-1:0] pm_rdata;
  rgb_t lut_rdata;
  logic reg_wr;
  logic [3:0] reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  int checks = 0, failures = 0;

  address_decoder #(.MAW(MAW), .PDW(PDW)) dut (.*);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory and register models
  logic [9:0]     m1 [2**MAW];
  logic [9:0]     m2 [2**MAW];
  logic [PDW-1:0] mp [2**MAW];
  logic [23:0]    ml [2**MAW];
  logic [15:0]    rg [16];
  logic grant_ok = 1'b0;
  int n_mem_ops = 0, n_bad = 0;

  assign mem_grant = mem_req && grant_ok;

  always_ff @(posedge clk) begin
    grant_ok <= ($urandom % 4) == 0;
    if (int'(vram1_en) + int'(vram2_en) + int'(pm_en) + int'(lut_en) > 1) n_bad++;
    if ((vram1_en || vram2_en || pm_en || lut_en) && !mem_grant) n_bad++;
    if (vram1_en || vram2_en || pm_en || lut_en) n_mem_ops++;
    if (vram1_en) begin if (m_we) m1[m_addr] <= m_wdata[9:0]; else vram1_rdata <= m1[m_addr]; end
    if (vram2_en) begin if (m_we) m2[m_addr] <= m_wdata[9:0]; else vram2_rdata <= m2[m_addr]; end
    if (pm_en)    begin if (m_we) mp[m_addr] <= m_wdata[PDW-1:0]; else pm_rdata <= mp[m_addr]; end
    if (lut_en)   begin if (m_we) ml[m_lut_addr[MAW-1:0]] <= m_wdata[23:0]; else lut_rdata <= rgb_t'(ml[m_lut_addr[MAW-1:0]]); end
    if (lut_en && m_lut_addr[9:MAW] != '0) n_bad++;
    if (reg_wr) rg[reg_addr] <= reg_wdata;
    reg_rdata <= rg[reg_addr];
  end

  // expected contents, kept by the host side
  logic [31:0] e1 [2**MAW];
  logic [31:0] e2 [2**MAW];
  logic [31:0] ep [2**MAW];
  logic [31:0] el [2**MAW];
  logic [31:0] er [16];

  task automatic access(input logic we, input logic [2:0] region, input int off,
                        input logic [31:0] wd, output logic [31:0] rd, output int clocks);
    clocks = 0;
    host_valid = 1'b1; host_we = we; host_addr = {region, 21'(off)}; host_wdata = wd;
    while (!host_ready) begin @(posedge clk); #1; clocks++; end
    @(posedge clk); #1; clocks++;
    host_valid = 1'b0;
    while (!host_rvalid) begin @(posedge clk); #1; clocks++; end
    rd = host_rdata;
    @(posedge clk); #1; clocks++;
  endtask

  initial begin
    logic [31:0] rd, wd, exp;
    logic [2:0] region;
    int off, clocks, ops0, n_wait;
    for (int i = 0; i < 2**MAW; i++) begin
      m1[i] = '0; m2[i] = '0; mp[i] = '0; ml[i] = '0; e1[i] = '0; e2[i] = '0; ep[i] = '0; el[i] = '0;
    end
    for (int i = 0; i < 16; i++) begin rg[i] = '0; er[i] = '0; end
    vram1_rdata = '0; vram2_rdata = '0; pm_rdata = '0; lut_rdata = '0; reg_rdata = '0;
    n_wait = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      region = 3'($urandom % 6);
      off    = (region == 3'(REG_MODE)) ? int'($urandom % 16) : int'($urandom % (2**MAW));
      wd     = $urandom;
      ops0   = n_mem_ops;
      if ($urandom % 2) begin
        access(1'b1, region, off, wd, rd, clocks);
        case (region)
          3'(REG_VRAM1): e1[off] = 32'(wd[9:0]);
          3'(REG_VRAM2): e2[off] = 32'(wd[9:0]);
          3'(REG_PMEM):  ep[off] = 32'(wd[PDW-1:0]);
          3'(REG_LUT):   el[off] = 32'(wd[23:0]);
          3'(REG_MODE):  er[off] = 32'(wd[15:0]);
          default: ;
        endcase
      end else begin
        access(1'b0, region, off, '0, rd, clocks);
        case (region)
          3'(REG_VRAM1): exp = e1[off];
          3'(REG_VRAM2): exp = e2[off];
          3'(REG_PMEM):  exp = ep[off];
          3'(REG_LUT):   exp = el[off];
          3'(REG_MODE):  exp = er[off];
          default:       exp = '0;
        endcase
        checks++;
        if (rd !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL read region %0d offset %0d: %h expected %h", region, off, rd, exp);
        end
      end
      // one memory operation per memory access, none for the others
      checks++;
      if (n_mem_ops - ops0 != ((region <= 3'(REG_LUT)) ? 1 : 0)) begin
        failures++; $display("FAIL region %0d made %0d memory operations", region, n_mem_ops - ops0);
      end
      if (region >= 3'(REG_MODE)) begin
        checks++;
        if (clocks != 3) begin
          failures++; $display("FAIL register access took %0d clocks", clocks);
        end
      end else if (clocks > 3) n_wait++;
    end
    checks++;
    if (n_bad != 0 || n_wait == 0) begin
      failures++; $display("FAIL %0d memory strobes outside a grant, %0d waits", n_bad, n_wait);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
