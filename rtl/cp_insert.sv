// cp_insert: cyclic-prefix insertion for 1024-sample OFDM symbols.
//
// Time-domain symbols are written in order into a 1184-word dual-port SRAM used as a
// circular buffer (1184 = 1024 + the longest prefix, 160). Once a whole symbol is in the
// buffer, the read side first replays its last CP samples (144 normally, 160 when the
// symbol was flagged `in_long_cp` on its first sample) and then the full symbol, so each
// symbol leaves as CP + 1024 consecutive samples. Words are released only when the symbol
// body is read, so the next symbol may overwrite a word right after it has been read, and
// a buffer of 1024 + 160 words is just enough for writing and reading to overlap.
// `in_ready` is high when there is room for a complete 1024-sample burst (the FFT delivers
// symbols as gap-free bursts and starts one only when `in_ready` is high).
// Output: one sample per clock while a symbol is available, `out_first` on the first CP
// sample; the consumer (DAC) takes every sample. Read latency one clock (synchronous SRAM).
module cp_insert
  import ofdm_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned CP_N  = 144,
  parameter int unsigned CP_L  = 160,
  parameter int unsigned DEPTH = 1184
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  logic  in_long_cp,
  input  cplx_t in_data,
  output logic  in_ready,
  output logic  out_valid,
  output logic  out_first,
  output cplx_t out_data,
  output logic  busy
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {RD_IDLE, RD_CP, RD_BODY} rd_state_t;
  rd_state_t state;

  logic [AW-1:0] wptr, rptr, base [2];
  logic          longf [2];
  logic          sw, sr;          // symbol slot write / read index
  logic [1:0]    nsym;            // complete symbols waiting
  logic [CW-1:0] occ;
  logic [10:0]   rcnt;
  logic          re, re_q, first_q, release_w;
  logic [31:0]   rdata;

  function automatic logic [AW-1:0] wrap_add(logic [AW-1:0] a, int unsigned b);
    int unsigned s;
    s = int'(a) + b;
    return AW'((s >= DEPTH) ? s - DEPTH : s);
  endfunction

  assign in_ready  = (occ <= CW'(DEPTH - N));
  assign re        = (state != RD_IDLE);
  assign release_w = (state == RD_BODY);
  assign busy      = (state != RD_IDLE) || (nsym != 0) || (occ != 0);

  dp_ram #(.DEPTH(DEPTH), .W(32)) u_ram (
    .clk(clk), .we(in_valid), .waddr(wptr), .wdata(in_data),
    .re(re), .raddr(rptr), .rdata(rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      sw <= 1'b0;
      sr <= 1'b0;
      nsym <= '0;
      occ <= '0;
      state <= RD_IDLE;
      rptr <= '0;
      rcnt <= '0;
      re_q <= 1'b0;
      first_q <= 1'b0;
      base[0] <= '0; base[1] <= '0;
      longf[0] <= 1'b0; longf[1] <= 1'b0;
    end else begin
      re_q <= re;
      first_q <= 1'b0;
      occ <= occ + CW'(in_valid) - CW'(release_w);
      // write side
      if (in_valid) begin
        wptr <= wrap_add(wptr, 1);
        if (in_first) begin
          base[sw]  <= wptr;
          longf[sw] <= in_long_cp;
        end
        if (in_last) sw <= ~sw;
      end
      // read side
      case (state)
        RD_IDLE:
          if (nsym != 0) begin
            state <= RD_CP;
            rptr  <= wrap_add(base[sr], longf[sr] ? N - CP_L : N - CP_N);
            rcnt  <= longf[sr] ? 11'(CP_L - 1) : 11'(CP_N - 1);
            first_q <= 1'b1;
          end
        RD_CP: begin
          rptr <= wrap_add(rptr, 1);
          rcnt <= rcnt - 1'b1;
          if (rcnt == '0) begin
            state <= RD_BODY;
            rptr  <= base[sr];
            rcnt  <= 11'(N - 1);
          end
        end
        default: begin
          rptr <= wrap_add(rptr, 1);
          rcnt <= rcnt - 1'b1;
          if (rcnt == '0) begin
            state <= RD_IDLE;
            sr <= ~sr;
          end
        end
      endcase
      nsym <= nsym + 2'(in_valid && in_last)
                   - 2'((state == RD_BODY) && (rcnt == '0));
    end
  end

  assign out_valid = re_q;
  assign out_data  = rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_first <= 1'b0;
    else begin
      out_first <= first_q;
      // the circular buffer must never hold more than DEPTH unreleased words
      assert (occ <= CW'(DEPTH));
    end
  end
endmodule
