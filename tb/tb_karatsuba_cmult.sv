// tb_karatsuba_cmult: three-multiplier complex product against an exact model.
//
// Random 16-bit samples b and Q1.15 factors w (including the extreme values -32768 and
// 32767 and the `unity` pass-through) are applied with `en` dropped at random. After four
// enabled clocks the output must equal round(b * w / 32768), saturated to 16 bits, exactly
// (re and im), or b itself when `unity` was set. The model uses the ordinary four-product
// formula, so a fault in the Karatsuba rearrangement shows.
`timescale 1ns/1ps
module tb_karatsuba_cmult;
  import ofdm_pkg::*;

  logic  clk = 0;
  always #1 clk = ~clk;

  logic  en, unity;
  cplx_t b, w, y;

  karatsuba_cmult dut (.*);

  int checks = 0, failures = 0;
  int q_re [$], q_im [$], nen = 0;

  function automatic int rnd(longint p);
    longint r;
    r = (p + 64'sd16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  function automatic int pick();
    case ($urandom_range(9))
      0: return -32768;
      1: return 32767;
      default: return int'($urandom_range(65535)) - 32768;
    endcase
  endfunction

  initial begin
    en = 0; unity = 0; b = '0; w = '0;
    repeat (6) begin @(negedge clk); en = 1; end   // flush the pipeline
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // an enabled edge has just taken the operands of the previous cycle
      if (en) begin
        nen++;
        if (nen > 4) begin
          int er, ei;
          er = q_re.pop_front(); ei = q_im.pop_front();
          checks++;
          if (int'(y.re) != er || int'(y.im) != ei) begin
            failures++;
            if (failures < 10) $display("got (%0d,%0d), expected (%0d,%0d)", y.re, y.im, er, ei);
          end
        end
      end
      en = ($urandom_range(4) != 0);
      if (en) begin
        int br, bi, wr, wi;
        br = pick(); bi = pick(); wr = pick(); wi = pick();
        unity = ($urandom_range(7) == 0);
        b.re = 16'(br); b.im = 16'(bi); w.re = 16'(wr); w.im = 16'(wi);
        if (unity) begin
          q_re.push_back(br); q_im.push_back(bi);
        end else begin
          q_re.push_back(rnd(longint'(br) * wr - longint'(bi) * wi));
          q_im.push_back(rnd(longint'(br) * wi + longint'(bi) * wr));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
