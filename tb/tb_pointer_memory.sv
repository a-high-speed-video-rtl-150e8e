// tb_pointer_memory: checks the index memory with the 4 x 4 example of a
// 180-degree rotation.
//
// Location (r, c) is loaded with (3 - r, 3 - c); a raster scan then reads
// the pairs back one per clock, each one clock after its address, as the
// video path does.  A random fill of a larger memory follows.
module tb_pointer_memory;
  localparam int AW = 8, DW = 8;   // {row, col} of 4 bits each

  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  pointer_memory #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    // 180-degree rotation of a 4 x 4 picture
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        en = 1'b1; we = 1'b1; addr = {4'(r), 4'(c)}; wdata = {4'(3 - r), 4'(3 - c)};
        @(posedge clk); #1;
      end
    // raster scan, one address per clock; each pair is checked in the clock
    // after its address
    we = 1'b0;
    for (int p = 0; p <= 16; p++) begin
      if (p < 16) begin
        en = 1'b1; addr = {4'(p / 4), 4'(p % 4)};
      end else en = 1'b0;
      @(posedge clk); #1;
      if (p < 16) begin
        checks++;
        if (rdata !== {4'(3 - p / 4), 4'(3 - p % 4)}) begin
          failures++; $display("FAIL (%0d,%0d) holds %h", p / 4, p % 4, rdata);
        end
      end
    end
    // random contents everywhere
    for (int a = 0; a < 2**AW; a++) begin
      model[a] = DW'($urandom);
      en = 1'b1; we = 1'b1; addr = AW'(a); wdata = model[a];
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int a = 0; a < 2**AW; a++) begin
      en = 1'b1; addr = AW'((a * 91 + 5) % (2**AW));
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[(a * 91 + 5) % (2**AW)]) begin
        failures++; $display("FAIL random read %0d", a);
      end
    end
    en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
