// Self-checking testbench for center_cog: fixed cases with known offsets,
// then random windows against an integer model of (c - a) / (a + b + c)
// scaled by 32 and truncated toward zero.
// The formula (c-a)/(a+b+c) is the published one; the 1/32-pixel scale and
// truncation toward zero checked here are this design's own choices.
module tb_center_cog;
  import pc_pkg::*;
  window_t win;
  logic signed [SUB_W-1:0] dx, dy;
  int checks = 0, failures = 0;

  center_cog dut (.win, .dx, .dy);

  function automatic int ref_cog(int a, int b, int c);
    int s = a + b + c;
    if (s == 0) return 0;
    return ((c - a) * 32) / s;
  endfunction

  task automatic check(int a_x, int c_x, int a_y, int c_y, int b);
    int ex, ey;
    win = '0;
    win[1][1] = pixel_t'(b);
    win[1][0] = pixel_t'(a_x); win[1][2] = pixel_t'(c_x);
    win[0][1] = pixel_t'(a_y); win[2][1] = pixel_t'(c_y);
    win[0][0] = pixel_t'($urandom); win[2][2] = pixel_t'($urandom);  // corners unused
    #1;
    ex = ref_cog(a_x, b, c_x);
    ey = ref_cog(a_y, b, c_y);
    checks += 2;
    if (int'(dx) != ex) begin failures++; $display("dx %0d,%0d,%0d: got %0d exp %0d", a_x, b, c_x, dx, ex); end
    if (int'(dy) != ey) begin failures++; $display("dy %0d,%0d,%0d: got %0d exp %0d", a_y, b, c_y, dy, ey); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked values: spot centred -> 0; all light on the right -> +1/2
    check(10, 10, 10, 10, 100);      // 0, 0
    check(0, 200, 200, 0, 200);      // +16, -16
    check(50, 100, 0, 0, 100);       // 50*32/250 = 6.4 -> 6
    check(100, 50, 0, 0, 100);       // -6.4 -> -6 (toward zero)
    check(0, 0, 0, 0, 0);            // empty window -> 0
    check(255, 255, 255, 0, 255);    // 0, -255*32/510 = -16
    repeat (5000) begin
      automatic int b = $urandom_range(255);
      check($urandom_range(b), $urandom_range(b), $urandom_range(b), $urandom_range(b), b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
