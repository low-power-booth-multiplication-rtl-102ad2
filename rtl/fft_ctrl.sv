// fft_ctrl: sequencer of an in-place radix-2 decimation-in-time FFT that
// uses a single butterfly, one butterfly per clock.
//
// For stage s = 0 .. L-1 (L = log2 N, taken from log2n at start) and
// butterfly j = 0 .. N/2-1 it issues
//   pos = j mod 2^s,  i0 = (j >> s) * 2^(s+1) + pos,  i1 = i0 + 2^s,
//   twiddle index pos * 2^(LOG2N_MAX-1-s) into the LOG2N_MAX table
//   (= W_N^(pos * N/2^(s+1))),
// and flags `scale` on every second stage (s odd), so that the results are
// halved once per two stages: 1/sqrt(N) overall for even L.
//
// Pipeline: addresses in cycle t (memory and ROM read), bf_valid/bf_scale
// in t+1 (butterfly inputs), wr_en/wa0/wa1 in t+2 (butterfly outputs
// written back). A stage reads words the previous stage wrote, so two drain
// cycles (`stall`) separate the stages. `done` pulses in the cycle after
// the last write. An FFT of N points takes L*(N/2+2)+1 cycles from the
// start cycle to done. The loop order, the pipeline and the drain are this
// design's choices; the scaling schedule is the one the FFT was evaluated
// with.
module fft_ctrl #(
  parameter int LOG2N_MAX = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [3:0]           log2n,
  output logic                 busy,
  output logic                 done,
  output logic                 stall,
  output logic [LOG2N_MAX-1:0] ra0,
  output logic [LOG2N_MAX-1:0] ra1,
  output logic [LOG2N_MAX-2:0] tw_addr,
  output logic                 bf_valid,
  output logic                 bf_scale,
  output logic                 wr_en,
  output logic [LOG2N_MAX-1:0] wa0,
  output logic [LOG2N_MAX-1:0] wa1
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t               state;
  logic [3:0]           len;      // L
  logic [3:0]           stage;    // s
  logic [LOG2N_MAX-2:0] j;        // butterfly within the stage
  logic                 drain_cnt;
  logic                 issue;

  logic [LOG2N_MAX-2:0] jmask, pos, jlast;
  always_comb begin
    jmask   = (LOG2N_MAX-1)'((1 << stage) - 1);
    pos     = j & jmask;
    ra0     = LOG2N_MAX'((((LOG2N_MAX)'(j) >> stage) << (stage + 1)) | LOG2N_MAX'(pos));
    ra1     = ra0 | LOG2N_MAX'(1 << stage);
    tw_addr = (LOG2N_MAX-1)'(pos << (LOG2N_MAX - 1 - int'(stage)));
    jlast   = (LOG2N_MAX-1)'((1 << (len - 1)) - 1);
    issue   = (state == S_RUN);
  end

  assign busy  = (state != S_IDLE);
  assign stall = (state == S_DRAIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      len       <= '0;
      stage     <= '0;
      j         <= '0;
      drain_cnt <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          len   <= log2n;
          stage <= '0;
          j     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (j == jlast) begin
            j         <= '0;
            drain_cnt <= 1'b0;
            state     <= S_DRAIN;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_DRAIN: begin
          drain_cnt <= 1'b1;
          if (drain_cnt) begin
            if (stage == len - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              stage <= stage + 1'b1;
              state <= S_RUN;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // delay line: issue -> butterfly input -> write-back
  logic [LOG2N_MAX-1:0] a0_d1, a1_d1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bf_valid <= 1'b0;
      bf_scale <= 1'b0;
      wr_en    <= 1'b0;
      a0_d1 <= '0; a1_d1 <= '0;
      wa0   <= '0; wa1   <= '0;
    end else begin
      bf_valid <= issue;
      bf_scale <= stage[0];
      a0_d1    <= ra0;
      a1_d1    <= ra1;
      wr_en    <= bf_valid;
      wa0      <= a0_d1;
      wa1      <= a1_d1;
    end
  end

  // a run must be a real FFT size that fits the memory
  a_size: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (log2n >= 1 && int'(log2n) <= LOG2N_MAX));
endmodule
