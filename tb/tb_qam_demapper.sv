// tb_qam_demapper: for every order and every bit pattern, builds the ideal constellation
// point from the 3GPP formulas, disturbs it by random offsets of up to 90 % of half the
// decision distance, and checks that the demapper returns the original bits one clock later.
// A point pushed just across a decision boundary must change exactly one bit (Gray).
`timescale 1ns/1ps
module tb_qam_demapper;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  mod_t mod;
  logic in_valid, out_valid;
  cplx_t in_sym;
  logic [7:0] out_bits;
  qam_demapper dut (.*);

  int checks = 0, failures = 0;
  function automatic int sg(logic b); return b ? -1 : 1; endfunction
  function automatic void ref_point(mod_t m, logic [7:0] b, output int li, output int lq);
    case (m)
      MOD_BPSK:  begin li = sg(b[0]); lq = sg(b[0]); end
      MOD_QPSK:  begin li = sg(b[0]); lq = sg(b[1]); end
      MOD_QAM16: begin li = sg(b[0]) * (2 - sg(b[2])); lq = sg(b[1]) * (2 - sg(b[3])); end
      MOD_QAM64: begin
        li = sg(b[0]) * (4 - sg(b[2]) * (2 - sg(b[4])));
        lq = sg(b[1]) * (4 - sg(b[3]) * (2 - sg(b[5])));
      end
      default: begin
        li = sg(b[0]) * (8 - sg(b[2]) * (4 - sg(b[4]) * (2 - sg(b[6]))));
        lq = sg(b[1]) * (8 - sg(b[3]) * (4 - sg(b[5]) * (2 - sg(b[7]))));
      end
    endcase
  endfunction
  int scl [5] = '{2360, 2360, 1056, 515, 256};
  int nb  [5] = '{1, 2, 4, 6, 8};

  task automatic apply(int m, int re, int im, logic [7:0] expb, bit one_bit_off);
    mod = mod_t'(m);
    in_sym.re = 16'(re); in_sym.im = 16'(im);
    in_valid = 1;
    @(posedge clk); #0.1;
    in_valid = 0;
    checks++;
    if (!out_valid) failures++;
    else if (!one_bit_off && out_bits != expb) begin
      failures++;
      $display("mod %0d (%0d,%0d) got %0h exp %0h", m, re, im, out_bits, expb);
    end else if (one_bit_off && $countones(out_bits ^ expb) != 1) begin
      failures++;
      $display("boundary mod %0d (%0d,%0d) got %0h from %0h", m, re, im, out_bits, expb);
    end
  endtask

  initial begin
    int li, lq, dn, oi, oq;
    mod = MOD_BPSK; in_valid = 0; in_sym = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 5; m++)
      for (int w = 0; w < (1 << nb[m]); w++) begin
        ref_point(mod_t'(m), 8'(w), li, lq);
        dn = scl[m] * 9 / 10;
        for (int r = 0; r < 4; r++) begin
          oi = int'($urandom_range(2 * dn)) - dn;
          oq = (m == 0) ? oi : int'($urandom_range(2 * dn)) - dn;
          apply(m, li * scl[m] + oi, lq * scl[m] + oq, 8'(w), 1'b0);
        end
        // move I just over the next boundary towards the centre (not for BPSK/QPSK sign)
        if (m >= 2 && (li > 1 || li < -1))
          apply(m, li * scl[m] - (li > 0 ? 1 : -1) * (scl[m] + 3), lq * scl[m], 8'(w), 1'b1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
