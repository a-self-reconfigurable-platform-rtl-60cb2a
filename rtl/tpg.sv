// tpg: test pattern generator for an N-input combinational circuit under
// test, with the three pattern sources of the platform:
//   mode 0 exhaustive    : a counter, 0 .. 2^N-1 (2^N patterns)
//   mode 1 pseudo-random : an N-bit Fibonacci LFSR, seed 1, shifting left
//                          with feedback = XOR of the state bits set in
//                          TAPS (x^5+x^3+1 by default); 2^N-1 patterns,
//                          every non-zero value once
//   mode 2 deterministic : NUM_DET stored patterns DET[0..NUM_DET-1]
// 'init' loads the first pattern of the selected mode; 'next' advances.
// 'last' is high while the current pattern is the final one of the set.
// The default stored set (12 patterns) is a greedy cover of every LUT
// input, output and contents fault of the C17 mapping, computed by fault
// simulation for this design; the LFSR polynomial is also this design's
// choice. The pattern is a register: it changes one cycle after init/next.
module tpg #(
  parameter int unsigned N       = 5,
  parameter logic [N-1:0] TAPS   = 5'b10100,
  parameter int unsigned NUM_DET = 12,
  parameter logic [NUM_DET-1:0][N-1:0] DET = {
      5'h1C, 5'h02, 5'h01, 5'h18, 5'h06, 5'h05,
      5'h00, 5'h0D, 5'h14, 5'h0A, 5'h13, 5'h0F}  // DET[11] .. DET[0]
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   mode,
  input  logic         init,
  input  logic         next,
  output logic [N-1:0] pattern,
  output logic         last
);
  logic [1:0]  mode_q;
  logic [N:0]  cnt;     // patterns already passed
  logic [N-1:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= '0; cnt <= '0; lfsr <= N'(1);
    end else if (init) begin
      mode_q <= mode; cnt <= '0; lfsr <= N'(1);
    end else if (next) begin
      cnt  <= cnt + 1'b1;
      lfsr <= {lfsr[N-2:0], ^(lfsr & TAPS)};
    end
  end

  always_comb begin
    unique case (mode_q)
      2'd1:    begin pattern = lfsr;                 last = (32'(cnt) == (1 << N) - 2); end
      2'd2:    begin pattern = (32'(cnt) < NUM_DET) ? DET[32'(cnt)] : '0; last = (32'(cnt) == NUM_DET - 1); end
      default: begin pattern = cnt[N-1:0];           last = (32'(cnt) == (1 << N) - 1); end
    endcase
  end
endmodule
