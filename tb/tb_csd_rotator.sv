// tb_csd_rotator: checks the W8, W16 and W32 constant rotators for every
// exponent on random inputs. The expected value is computed here from
// round(cos/sin * 2^14) coefficients: the rotated product is formed with
// integer arithmetic, rounded half up at bit 14, and must match exactly.
module tb_csd_rotator;
  localparam int W = 22, FRAC = 14;
  localparam real PI = 3.14159265358979323846;

  logic signed [W-1:0] x_re, x_im;
  logic [2:0] e8;  logic [3:0] e16;  logic [4:0] e32;
  logic signed [W-1:0] y8_re, y8_im, y16_re, y16_im, y32_re, y32_im;
  int checks = 0, failures = 0;

  csd_rotator #(.W(W), .M(8))  u8  (.x_re, .x_im, .e(e8),  .y_re(y8_re),  .y_im(y8_im));
  csd_rotator #(.W(W), .M(16)) u16 (.x_re, .x_im, .e(e16), .y_re(y16_re), .y_im(y16_im));
  csd_rotator #(.W(W), .M(32)) u32 (.x_re, .x_im, .e(e32), .y_re(y32_re), .y_im(y32_im));

  function automatic longint rq(real v);
    return (v >= 0.0) ? longint'($rtoi(v + 0.5)) : -longint'($rtoi(0.5 - v));
  endfunction

  // floor((v + 2^13) / 2^14)
  function automatic longint rnd(longint v);
    return (v + 64'sd8192) >>> FRAC;
  endfunction

  // expected x * W_M^e
  task automatic model(int m, int e, longint a, longint b, output longint yr, output longint yi);
    int q = e / (m / 4), r = e % (m / 4);
    longint c, s, tr, ti;
    c = rq($cos(2.0 * PI * r / m) * 16384.0);
    s = rq($sin(2.0 * PI * r / m) * 16384.0);
    if (r == 0) begin tr = a; ti = b; end
    else begin tr = rnd(a * c + b * s); ti = rnd(b * c - a * s); end
    case (q)
      0: begin yr =  tr; yi =  ti; end
      1: begin yr =  ti; yi = -tr; end
      2: begin yr = -tr; yi = -ti; end
      default: begin yr = -ti; yi =  tr; end
    endcase
  endtask

  task automatic cmp(int m, int e, logic signed [W-1:0] gr, logic signed [W-1:0] gi);
    longint yr, yi;
    model(m, e, x_re, x_im, yr, yi);
    checks++;
    if (longint'(gr) != yr || longint'(gi) != yi) begin
      failures++;
      $display("FAIL: M=%0d e=%0d x=(%0d,%0d) got (%0d,%0d) want (%0d,%0d)",
               m, e, x_re, x_im, gr, gi, yr, yi);
    end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      x_re = W'($signed($urandom_range(2000000)) - 1000000);
      x_im = W'($signed($urandom_range(2000000)) - 1000000);
      for (int e = 0; e < 32; e++) begin
        e8 = 3'(e); e16 = 4'(e); e32 = 5'(e);
        #1;
        if (e < 8)  cmp(8, e, y8_re, y8_im);
        if (e < 16) cmp(16, e, y16_re, y16_im);
        cmp(32, e, y32_re, y32_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
