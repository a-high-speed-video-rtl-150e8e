// tb_address_generator: checks the sequential {row, col} addresses.
//
// The testbench makes its own raster (6 active pixels and 4 blank clocks per
// line, 5 active lines and 2 blank lines per frame) and drives de and
// vblank with it.  Every active clock the address must be the pixel's own
// row and column; addr_valid must follow de; and exactly 30 addresses must
// appear per frame, one per clock of active video.
module tb_address_generator;
  localparam int ROW_W = 3, COL_W = 4;
  localparam int HA = 6, HT = 10, VA = 5, VT = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic de = 1'b0, vblank = 1'b1;
  logic [ROW_W+COL_W-1:0] addr;
  logic addr_valid;
  int checks = 0, failures = 0;

  address_generator #(.ROW_W(ROW_W), .COL_W(COL_W)) dut (.*);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_valid;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      n_valid = 0;
      for (int v = 0; v < VT; v++) begin
        for (int h = 0; h < HT; h++) begin
          de     = (h < HA) && (v < VA);
          vblank = (v >= VA);
          #1;
          checks++;
          if (addr_valid !== de) begin
            failures++; $display("FAIL addr_valid at %0d,%0d", v, h);
          end
          if (de) begin
            n_valid++;
            checks++;
            if (addr !== {ROW_W'(v), COL_W'(h)}) begin
              failures++;
              $display("FAIL frame %0d line %0d pixel %0d: addr %h expected %h", f, v, h, addr,
                       {ROW_W'(v), COL_W'(h)});
            end
          end
          @(posedge clk); #1;
        end
      end
      checks++;
      if (n_valid != HA * VA) begin
        failures++; $display("FAIL %0d addresses in frame %0d", n_valid, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
