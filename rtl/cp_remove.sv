// cp_remove: strips the cyclic prefix from the received, frequency-corrected sample stream.
//
// `in_sym_start` marks the first sample (first CP sample) of the first data symbol after the
// preamble, as found by the synchroniser. From there the unit alternates between dropping
// the CP and passing the 1024 symbol samples, for `num_sym` symbols. Symbols are numbered
// from the preamble (index 0), and the CP of symbol l is CP_L samples long when l is a
// multiple of LONG_PERIOD, else CP_N, the same rule the transmitter uses.
// Output: the 1024 samples of each symbol, `out_first` on sample 0; it follows the input
// with one clock of latency and keeps the input's gaps. `done` pulses after the last
// sample of the last symbol. Both prefix lengths must be at least 2.
module cp_remove
  import ofdm_pkg::*;
#(
  parameter int unsigned N           = 1024,
  parameter int unsigned CP_N        = 144,
  parameter int unsigned CP_L        = 160,
  parameter int unsigned LONG_PERIOD = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sym_start,
  input  cplx_t       in_sample,
  input  logic [15:0] num_sym,
  output logic        out_valid,
  output logic        out_first,
  output logic        out_last,
  output cplx_t       out_sample,
  output logic        done
);
  typedef enum logic [1:0] {R_IDLE, R_CP, R_BODY} st_t;
  st_t st;
  logic [10:0] cnt;
  logic [15:0] nleft;
  logic [2:0]  lmod;   // symbol index modulo LONG_PERIOD

  function automatic logic [10:0] cp_len(logic [2:0] lm);
    return (lm == 3'd0) ? 11'(CP_L) : 11'(CP_N);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE;
      cnt <= '0;
      nleft <= '0;
      lmod <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last <= 1'b0;
      out_sample <= '0;
      done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      done      <= 1'b0;
      if (in_valid) begin
        case (st)
          R_IDLE:
            if (in_sym_start && num_sym != 0) begin
              // symbol 1: its CP starts with this sample
              lmod  <= 3'(1 % LONG_PERIOD);
              nleft <= num_sym;
              cnt   <= cp_len(3'(1 % LONG_PERIOD)) - 11'd2;
              st    <= R_CP;
            end
          R_CP: begin
            cnt <= cnt - 1'b1;
            if (cnt == '0) begin
              st  <= R_BODY;
              cnt <= '0;
            end
          end
          default: begin
            out_valid  <= 1'b1;
            out_first  <= (cnt == '0);
            out_last   <= (cnt == 11'(N - 1));
            out_sample <= in_sample;
            cnt <= cnt + 1'b1;
            if (cnt == 11'(N - 1)) begin
              nleft <= nleft - 1'b1;
              lmod  <= (lmod == 3'(LONG_PERIOD - 1)) ? '0 : lmod + 1'b1;
              cnt   <= cp_len((lmod == 3'(LONG_PERIOD - 1)) ? '0 : lmod + 1'b1) - 1'b1;
              st    <= R_CP;
              if (nleft == 16'd1) begin
                st <= R_IDLE;
                done <= 1'b1;
              end
            end
          end
        endcase
      end
    end
  end

endmodule
