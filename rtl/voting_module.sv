// voting_module: one bank of the (b, theta) accumulator with peak tracking.
//
// A simple dual-port RAM of DEPTH = 48 * B_SPAN saturating VOTE_W-bit
// counters. A vote at address A reads A(b, theta) on port A and one cycle
// later writes A(b, theta) + 1 on port B (the address and the write enable
// pass through one register on their way to port B). The incremented count
// is compared at once with the highest count seen so far on the vote's side
// of the road: angles below 90 degrees are the left lane, angles above 90
// degrees the right lane. A count that beats the current maximum replaces
// it and registers the vote's b and theta as the new peak, so when the frame
// ends the peak of each side is already known without scanning the RAM.
// A peak whose count is below VOTE_TH is reported as not valid.
//
// Back-to-back votes to the same cell would read a count the previous vote
// has not written yet; a forwarding path feeds the value being written back
// into the increment instead (this design's addition; the read and write
// ports alone would lose such votes).
//
// Frame protocol: votes are accepted while ready is high. frame_end marks the
// last cycle of a frame (it may carry the frame's last vote). Two cycles
// later done pulses with the peaks on the peak_* outputs (held until the
// next done) and the bank starts clearing (ready falls right after
// frame_end): port B writes zero to every
// address, one per cycle, DEPTH cycles, after which ready rises again. The
// bank also clears itself after reset. Two such banks alternate, one voting
// while the other clears. Votes arriving while not ready are dropped and
// flagged on lost. The read-increment-write path, the running peak
// registers, the 90-degree split and the even/odd clearing follow the
// original architecture; the counter width, the threshold value, the
// forwarding and the frame protocol are this design's choices.
module voting_module
  import lane_pkg::*;
#(
  parameter int B_LO    = B_MIN,
  parameter int B_HI    = B_MAX,
  parameter int VOTE_TH = 16,
  localparam int B_SPAN = B_HI - B_LO + 1,
  localparam int DEPTH  = N_ROWS * B_SPAN,
  localparam int ADDR_W = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  vote,
  input  logic [ADDR_W-1:0]     addr,
  input  logic signed [B_W-1:0] b,
  input  logic [THETA_W-1:0]    theta,
  input  logic                  frame_end,
  output logic                  ready,
  output logic                  lost,
  output logic                  done,
  output logic                  peak_left_valid,
  output logic signed [B_W-1:0] peak_left_b,
  output logic [THETA_W-1:0]    peak_left_theta,
  output logic [VOTE_W-1:0]     peak_left_votes,
  output logic                  peak_right_valid,
  output logic signed [B_W-1:0] peak_right_b,
  output logic [THETA_W-1:0]    peak_right_theta,
  output logic [VOTE_W-1:0]     peak_right_votes
);
  typedef enum logic [0:0] { S_CLEAR, S_VOTE } state_t;

  typedef struct packed {
    logic [VOTE_W-1:0]     votes;
    logic signed [B_W-1:0] b;
    logic [THETA_W-1:0]    theta;
  } peak_t;

  state_t state;
  logic [ADDR_W-1:0] clr_addr;

  // Dual-port RAM.
  logic [VOTE_W-1:0] mem [DEPTH];
  logic [VOTE_W-1:0] dout_a;
  logic              web;
  logic [ADDR_W-1:0] addrb;
  logic [VOTE_W-1:0] dinb;

  // Stage 1 (port A read) -> stage 2 (increment, port B write, compare).
  logic                  s1_vote, s1_fwd, s1_left, s1_end;
  logic [ADDR_W-1:0]     s1_addr;
  logic signed [B_W-1:0] s1_b;
  logic [THETA_W-1:0]    s1_theta;
  logic                  s2_end;
  logic [VOTE_W-1:0]     last_w;    // value written by the previous vote
  logic [VOTE_W-1:0]     cur, inc;
  peak_t                 run_l, run_r;

  logic accept;
  assign ready  = (state == S_VOTE) && !s1_end && !s2_end;
  assign accept = vote && ready;
  assign lost   = vote && !ready;

  always_ff @(posedge clk) begin
    dout_a <= mem[addr];
  end
  always_ff @(posedge clk) begin
    if (web) mem[addrb] <= dinb;
  end

  assign cur   = s1_fwd ? last_w : dout_a;
  assign inc   = (cur == {VOTE_W{1'b1}}) ? cur : cur + 1'b1;
  assign web   = (state == S_CLEAR) || s1_vote;
  assign addrb = (state == S_CLEAR) ? clr_addr : s1_addr;
  assign dinb  = (state == S_CLEAR) ? '0 : inc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_vote  <= 1'b0;
      s1_fwd   <= 1'b0;
      s1_left  <= 1'b0;
      s1_end   <= 1'b0;
      s1_addr  <= '0;
      s1_b     <= '0;
      s1_theta <= '0;
      s2_end   <= 1'b0;
      last_w   <= '0;
    end else begin
      s1_vote <= accept;
      s1_fwd  <= accept && s1_vote && (addr == s1_addr);
      s1_end  <= frame_end && ready;
      s2_end  <= s1_end;
      if (accept) begin
        s1_addr  <= addr;
        s1_b     <= b;
        s1_theta <= theta;
        s1_left  <= (int'(theta) < THETA_SPLIT);
      end
      if (s1_vote) last_w <= inc;
    end
  end

  // Running peaks, result registers and the clear sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CLEAR;
      clr_addr <= '0;
      run_l    <= '0;
      run_r    <= '0;
      done     <= 1'b0;
      {peak_left_valid, peak_left_b, peak_left_theta, peak_left_votes}     <= '0;
      {peak_right_valid, peak_right_b, peak_right_theta, peak_right_votes} <= '0;
    end else begin
      done <= 1'b0;
      if (s2_end) begin
        peak_left_valid  <= (run_l.votes >= VOTE_W'(VOTE_TH));
        peak_left_b      <= run_l.b;
        peak_left_theta  <= run_l.theta;
        peak_left_votes  <= run_l.votes;
        peak_right_valid <= (run_r.votes >= VOTE_W'(VOTE_TH));
        peak_right_b     <= run_r.b;
        peak_right_theta <= run_r.theta;
        peak_right_votes <= run_r.votes;
        run_l    <= '0;
        run_r    <= '0;
        done     <= 1'b1;
        state    <= S_CLEAR;
        clr_addr <= '0;
      end else begin
        if (s1_vote && s1_left && inc > run_l.votes)
          run_l <= '{votes: inc, b: s1_b, theta: s1_theta};
        if (s1_vote && !s1_left && inc > run_r.votes)
          run_r <= '{votes: inc, b: s1_b, theta: s1_theta};
        if (state == S_CLEAR) begin
          if (clr_addr == ADDR_W'(DEPTH - 1)) state <= S_VOTE;
          else clr_addr <= clr_addr + 1'b1;
        end
      end
    end
  end

  // A frame's last vote is always in stage 2 before its end is handled, so
  // clearing never competes with a vote for port B.
  a_no_vote_while_clearing: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_CLEAR |-> !s1_vote);
endmodule
