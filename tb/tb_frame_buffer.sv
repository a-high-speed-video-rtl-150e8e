// tb_frame_buffer: checks the single-port frame store.
//
// Every word of a 256-word buffer is written with a value from a seeded
// generator and read back in a different order; each read must return the
// value last written one clock after the address, and the output must hold
// while the port is idle.  A second pass overwrites half the words.
module tb_frame_buffer;
  localparam int AW = 8, DW = 10;

  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  frame_buffer #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [DW-1:0] d);
    en = 1'b1; we = 1'b1; addr = AW'(a); wdata = d;
    @(posedge clk); #1;
    en = 1'b0; we = 1'b0;
    model[a] = d;
  endtask

  task automatic read_check(input int a);
    en = 1'b1; we = 1'b0; addr = AW'(a);
    @(posedge clk); #1;
    en = 1'b0;
    checks++;
    if (rdata !== model[a]) begin
      failures++; $display("FAIL read %0d: got %h expected %h", a, rdata, model[a]);
    end
    // output holds while idle
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++; $display("FAIL hold %0d", a);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < 2**AW; a++) write(a, DW'($urandom));
    for (int a = 0; a < 2**AW; a++) read_check((a * 37 + 11) % (2**AW));
    for (int a = 0; a < 2**AW; a += 2) write(a, DW'($urandom));
    for (int a = 2**AW - 1; a >= 0; a--) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
