// startup_tests: power-up statistical tests on the internal random words.
//
// After start_i (pulsed at power-up by the top level) the next 20 000 bits of
// the word stream, i.e. 1250 words of 16 bits, are examined with the four
// classic power-up tests for random number generators:
//   * monobit: the number of ones X must satisfy 9654 < X < 10346;
//   * poker: with f(i) the counts of the 16 possible 4-bit nibbles in the
//     5000 nibbles, X = 16/5000 * sum f(i)^2 - 5000 must satisfy
//     1.03 < X < 57.4; in integers, 25 005 150 < 16 * sum f(i)^2 < 25 287 000;
//   * runs: the number of runs of ones, and separately of zeros, of length
//     1, 2, 3, 4, 5 and 6 or more must lie in [2267,2733], [1079,1421],
//     [502,748], [223,402], [90,223], [90,223];
//   * long run: no run of 34 or more equal bits.
// The test is the one named for internal random numbers; the sample size and
// bounds are those of FIPS 140-1, chosen here since the generator's
// description leaves them open.  The tests need the word size to be 16.
//
// Words are examined bit-serially, bit 0 first, one bit per clock, so words
// must arrive at least M clocks apart (the post-processor delivers one per 256
// clocks); a word arriving while the previous one is still being shifted is
// not examined.  busy_o is high from start_i until done_o; done_o pulses for
// one clock with pass_o and fail_o valid; they hold until the next start_i.
// fail_o: bit 0 monobit, 1 poker, 2 runs, 3 long run.
`timescale 1ps / 1ps
module startup_tests #(
  parameter int unsigned M     = trng_pkg::CODE_M,
  parameter int unsigned NBITS = 20_000
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [M-1:0] r_i,
  input  logic         r_valid_i,
  output logic         busy_o,
  output logic         done_o,
  output logic         pass_o,
  output logic [3:0]   fail_o
);

  localparam int unsigned MAXRUN = 34;

  typedef struct packed {
    logic [15:0] lo;
    logic [15:0] hi;
  } bound_t;

  // Acceptance intervals for runs of length 1..5 and 6+.
  function automatic bound_t run_bound(int unsigned len);
    case (len)
      1:       return '{lo: 16'd2267, hi: 16'd2733};
      2:       return '{lo: 16'd1079, hi: 16'd1421};
      3:       return '{lo: 16'd502,  hi: 16'd748};
      4:       return '{lo: 16'd223,  hi: 16'd402};
      default: return '{lo: 16'd90,   hi: 16'd223};
    endcase
  endfunction

  logic [M-1:0]  word;          // bits still to examine, next in bit 0
  logic [4:0]    left;          // bits left in word
  logic [14:0]   nbits;         // bits examined so far
  logic [14:0]   ones;
  logic [12:0]   nib_cnt [16];  // poker counts
  logic [2:0]    nib;           // earlier bits of the current nibble
  logic [1:0]    nib_pos;
  logic [15:0]   runs [2][6];   // [bit value][length-1, last = 6+]
  logic          run_bit;
  logic [5:0]    run_len;
  logic          long_run;
  logic          finishing;     // one clock to close the last run and evaluate

  logic          bit_now;

  assign bit_now = word[0];

  // Run bucket of a closing run.
  function automatic int unsigned bucket(logic [5:0] len);
    return (len >= 6'd6) ? 5 : int'(len) - 1;
  endfunction

  // Final evaluation (combinational, used in the finishing clock).
  logic [3:0] verdict;
  always_comb begin
    logic [31:0] sumsq;
    logic        runs_bad;
    bound_t      bd;
    logic [15:0] n;
    verdict = '0;
    verdict[0] = !(ones > 15'd9654 && ones < 15'd10346);
    sumsq = '0;
    for (int i = 0; i < 16; i++) sumsq += 32'(nib_cnt[i]) * 32'(nib_cnt[i]);
    verdict[1] = !((sumsq << 4) > 32'd25_005_150 && (sumsq << 4) < 32'd25_287_000);
    runs_bad = 1'b0;
    for (int b = 0; b < 2; b++)
      for (int l = 0; l < 6; l++) begin
        bd = run_bound(l + 1);
        // the run still open at the end is counted as well
        n  = runs[b][l] +
          16'((run_len != '0) && (int'(run_bit) == b) && (bucket(run_len) == l));
        if (n < bd.lo || n > bd.hi) runs_bad = 1'b1;
      end
    verdict[2] = runs_bad;
    verdict[3] = long_run;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_o    <= 1'b0;
      done_o    <= 1'b0;
      pass_o    <= 1'b0;
      fail_o    <= '0;
      finishing <= 1'b0;
      left      <= '0;
      word      <= '0;
      nbits     <= '0;
      ones      <= '0;
      nib       <= '0;
      nib_pos   <= '0;
      run_bit   <= 1'b0;
      run_len   <= '0;
      long_run  <= 1'b0;
      for (int i = 0; i < 16; i++) nib_cnt[i] <= '0;
      for (int b = 0; b < 2; b++) for (int l = 0; l < 6; l++) runs[b][l] <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        busy_o    <= 1'b1;
        pass_o    <= 1'b0;
        fail_o    <= '0;
        finishing <= 1'b0;
        left      <= '0;
        nbits     <= '0;
        ones      <= '0;
        nib_pos   <= '0;
        run_len   <= '0;
        long_run  <= 1'b0;
        for (int i = 0; i < 16; i++) nib_cnt[i] <= '0;
        for (int b = 0; b < 2; b++) for (int l = 0; l < 6; l++) runs[b][l] <= '0;
      end else if (finishing) begin
        finishing <= 1'b0;
        busy_o    <= 1'b0;
        done_o    <= 1'b1;
        fail_o    <= verdict;
        pass_o    <= (verdict == '0);
      end else if (busy_o) begin
        if (left == '0) begin
          if (r_valid_i) begin
            word <= r_i;
            left <= 5'(M);
          end
        end else begin
          // examine one bit
          word  <= word >> 1;
          left  <= left - 1'b1;
          nbits <= nbits + 1'b1;
          ones  <= ones + 15'(bit_now);
          nib     <= {bit_now, nib[2:1]};
          nib_pos <= nib_pos + 1'b1;
          if (nib_pos == 2'd3) nib_cnt[{bit_now, nib}] <= nib_cnt[{bit_now, nib}] + 1'b1;
          if (run_len != '0 && bit_now == run_bit) begin
            if (run_len != 6'd63) run_len <= run_len + 1'b1;
            if (run_len + 1'b1 >= 6'(MAXRUN)) long_run <= 1'b1;
          end else begin
            if (run_len != '0) runs[run_bit][bucket(run_len)] <= runs[run_bit][bucket(run_len)] + 1'b1;
            run_bit <= bit_now;
            run_len <= 6'd1;
          end
          if (nbits == 15'(NBITS - 1)) begin
            finishing <= 1'b1;
            left      <= '0;
          end
        end
      end
    end
  end

  a_word_size : assert property (@(posedge clk_i) M == 16);

endmodule
