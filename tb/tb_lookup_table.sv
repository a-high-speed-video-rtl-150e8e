// tb_lookup_table: checks the colormap tables.
//
// First the start-up grey scale is read for all 1024 entries (each colour
// must equal the entry number divided by 4).  Then a colormap computed by
// the testbench (red = i/4 XOR 0xA5, green = 255 - i/4, blue = i mod 256)
// is written and read back at random addresses, one clock after each
// address, with the output holding while idle.
module tb_lookup_table;
  import video_pkg::*;
  localparam int AW = 10;

  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  rgb_t wdata = '0, rgb;
  int checks = 0, failures = 0;

  lookup_table #(.AW(AW)) dut (.*);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rgb_t cmap(input int i);
    return '{r: 8'(i / 4) ^ 8'hA5, g: 8'(255 - i / 4), b: 8'(i % 256)};
  endfunction

  task automatic read_check(input int a, input rgb_t exp);
    en = 1'b1; we = 1'b0; addr = AW'(a);
    @(posedge clk); #1;
    en = 1'b0;
    checks++;
    if (rgb !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL entry %0d: %h expected %h", a, rgb, exp);
    end
  endtask

  initial begin
    int a;
    @(posedge clk); #1;
    for (int i = 0; i < 2**AW; i++) read_check(i, '{r: 8'(i / 4), g: 8'(i / 4), b: 8'(i / 4)});
    for (int i = 0; i < 2**AW; i++) begin
      en = 1'b1; we = 1'b1; addr = AW'(i); wdata = cmap(i);
      @(posedge clk); #1;
    end
    en = 1'b0; we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      a = int'($urandom % (2**AW));
      read_check(a, cmap(a));
      @(posedge clk); #1;
      checks++;
      if (rgb !== cmap(a)) begin
        failures++; $display("FAIL hold entry %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
