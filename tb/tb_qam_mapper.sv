// tb_qam_mapper: applies every input pattern of every modulation order and compares the
// mapper output with the 3GPP TS 38.211 formulas written out order by order. It also checks
// Gray labelling: horizontally or vertically neighbouring points differ in exactly one bit.
// Latency must be one clock.
`timescale 1ns/1ps
module tb_qam_mapper;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  mod_t mod;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_bits;
  cplx_t out_sym;
  qam_mapper dut (.*);

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

  initial begin
    int li, lq, ri, rq, li2, lq2, npts;
    int label_at [int];
    mod = MOD_BPSK; in_valid = 0; in_bits = 0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 5; m++) begin
      label_at.delete();
      npts = 1 << nb[m];
      for (int w = 0; w < npts; w++) begin
        mod = mod_t'(m);
        in_bits = 8'(w) | (8'($urandom) & ~8'((1 << nb[m]) - 1));  // junk in unused bits
        in_valid = 1;
        @(posedge clk);
        #0.1;
        in_valid = 0;
        ref_point(mod_t'(m), 8'(w), li, lq);
        checks++;
        if (!out_valid || out_sym.re != li * scl[m] || out_sym.im != lq * scl[m]) begin
          failures++;
          $display("mod %0d bits %0h got %0d,%0d exp %0d,%0d", m, w, out_sym.re, out_sym.im,
                   li * scl[m], lq * scl[m]);
        end
        label_at[(li + 32) * 64 + (lq + 32)] = w;
      end
      // Gray adjacency
      if (m >= 2) begin
        foreach (label_at[key]) begin
          li = key / 64 - 32; lq = key % 64 - 32;
          for (int d = 0; d < 2; d++) begin
            li2 = li + (d == 0 ? 2 : 0);
            lq2 = lq + (d == 1 ? 2 : 0);
            if (label_at.exists((li2 + 32) * 64 + (lq2 + 32))) begin
              checks++;
              if ($countones(label_at[key] ^ label_at[(li2 + 32) * 64 + (lq2 + 32)]) != 1)
                failures++;
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
