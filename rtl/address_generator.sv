// address_generator: sequential pixel addresses for capture and for the
// pointer memory.
//
// A column counter advances on every active pixel and clears whenever the
// line is blanked; a row counter advances at the end of each active line
// (the clock after de falls) and clears during vertical blanking.  Counting
// therefore stops during all blanking, as the sync generator dictates.  The
// address is the ordered pair {row, col}; the same address goes to the
// pointer memory and to the frame buffer being written.
//
// Timing: addr/addr_valid belong to the same clock as the de input; there
// is no added latency (the counters are registers that already hold the
// index of the pixel whose de is high).  Reset clears both counters.
module address_generator #(
  parameter int unsigned ROW_W = 10,
  parameter int unsigned COL_W = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   de,       // active pixel, from the sync generator
  input  logic                   vblank,   // vertical blanking, from the sync generator
  output logic [ROW_W+COL_W-1:0] addr,     // {row, col}
  output logic                   addr_valid
);

  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic             de_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row  <= '0;
      col  <= '0;
      de_q <= 1'b0;
    end else begin
      de_q <= de;
      col  <= de ? col + 1'b1 : '0;
      if (vblank)           row <= '0;
      else if (de_q && !de) row <= row + 1'b1;
    end
  end

  assign addr       = {row, col};
  assign addr_valid = de;

endmodule
