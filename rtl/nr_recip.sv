// nr_recip: pipelined Newton-Raphson reciprocal of an unsigned 32-bit value.
//
// The divisor is normalised to dn = d * 2^lz / 2^32 in [0.5, 1) (lz = leading zeros). A
// 16-entry table, addressed by the four bits after the leading one, gives a seed x0 ~ 1/dn
// (round(65536 / (0.5 + (i + 0.5)/32)), about 5 bits good). Two iterations
// x(k+1) = x(k) * (2 - dn * x(k)) bring it to the 16-bit precision of the datapath.
// Result: 1/d = m * 2^-16 * 2^-e, with m in Q2.16 (m in (1, 2]) and e = 32 - lz.
// d = 0 returns the largest value (m = 2^17 - 1, e = 0).
// Timing: three pipeline registers (normalise + seed, iteration 1, iteration 2); a
// consumer that scales by m in a fourth clock completes a division in four clocks.
module nr_recip (
  input  logic        clk,
  input  logic [31:0] d,
  output logic [17:0] m,
  output logic [5:0]  e
);
  localparam logic [17:0] SEED [16] = '{
    18'd127100, 18'd119837, 18'd113360, 18'd107546, 18'd102300, 18'd97542, 18'd93207,
    18'd89241, 18'd85598, 18'd82241, 18'd79138, 18'd76260, 18'd73584, 18'd71090, 18'd68759,
    18'd66576
  };

  logic [5:0]  lz;
  logic [31:0] dnorm;
  always_comb begin
    lz = 6'd32;
    for (int i = 0; i < 32; i++) if (d[i]) lz = 6'(31 - i);
    dnorm = d << lz;
  end

  // one Newton-Raphson step on Q2.16 x with Q0.18 dn
  function automatic logic [17:0] nr_step(logic [17:0] x, logic [17:0] dn);
    logic [35:0] p;       // dn * x, scale 2^34
    logic [36:0] two_m;   // 2 - dn * x, scale 2^34
    logic [54:0] q;
    p = 36'(dn) * 36'(x);
    two_m = (37'd2 << 34) - 37'(p);
    q = 55'(x) * 55'(two_m);
    q = q >> 34;
    return (q > 55'h3ffff) ? 18'h3ffff : 18'(q);
  endfunction

  logic [17:0] dn1, x1, dn2, x2;
  logic [5:0]  e1, e2;
  logic        z1, z2;

  always_ff @(posedge clk) begin
    dn1 <= dnorm[31:14];
    x1  <= SEED[dnorm[30:27]];
    e1  <= 6'd32 - lz;
    z1  <= (d == '0);

    dn2 <= dn1;
    x2  <= nr_step(x1, dn1);
    e2  <= e1;
    z2  <= z1;

    m   <= z2 ? 18'h1ffff : nr_step(x2, dn2);
    e   <= z2 ? 6'd0 : e2;
  end
endmodule
