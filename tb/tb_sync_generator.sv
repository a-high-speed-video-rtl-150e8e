// tb_sync_generator: checks the raster produced by sync_generator.
//
// Two small timings are run.  For each, the position the raster must have
// reached after k clocks is worked out from k alone (k mod line length,
// k / line length mod frame length) and every output is compared in every
// clock for three frames.  The number of active pixels per frame and the
// sync pulse lengths are counted and compared with the programmed values.
module tb_sync_generator;
  import video_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  timing_t tim;
  logic de, hblank, vblank, hsync, vsync, blank, csync;
  int checks = 0, failures = 0;

  sync_generator dut (.*);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at clock %0d: got %0b expected %0b", what, k, got, exp);
    end
  endtask

  task automatic run(input int ha, input int hf, input int hs, input int hb,
                     input int va, input int vf, input int vs, input int vb);
    int ht, vt, hc, vc, n_de, n_hs;
    tim = '{h_active: 12'(ha), h_front: 12'(hf), h_sync: 12'(hs), h_back: 12'(hb),
            v_active: 12'(va), v_front: 12'(vf), v_sync: 12'(vs), v_back: 12'(vb)};
    ht = ha + hf + hs + hb;
    vt = va + vf + vs + vb;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    n_de = 0; n_hs = 0;
    for (int k = 1; k <= 3 * ht * vt; k++) begin
      @(posedge clk); #1;
      hc = k % ht;
      vc = (k / ht) % vt;
      check(de,     (hc < ha) && (vc < va), "de", k);
      check(hblank, !(hc < ha), "hblank", k);
      check(vblank, !(vc < va), "vblank", k);
      check(hsync,  (hc >= ha + hf) && (hc < ha + hf + hs), "hsync", k);
      check(vsync,  (vc >= va + vf) && (vc < va + vf + vs), "vsync", k);
      check(blank,  !((hc < ha) && (vc < va)), "blank", k);
      check(csync,  hsync | vsync, "csync", k);
      if (k <= ht * vt) begin
        n_de += int'(de);
        n_hs += int'(hsync);
      end
    end
    // rate: active pixels and sync clocks per frame (clocks 1 .. ht*vt cover
    // every raster position once)
    checks++;
    if (n_de != ha * va) begin
      failures++; $display("FAIL active pixels per frame %0d, expected %0d", n_de, ha * va);
    end
    checks++;
    if (n_hs != hs * vt) begin
      failures++; $display("FAIL hsync clocks per frame %0d, expected %0d", n_hs, hs * vt);
    end
  endtask

  initial begin
    run(6, 2, 3, 2, 4, 1, 2, 1);
    run(9, 1, 1, 4, 3, 2, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
