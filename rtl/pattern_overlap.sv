// Pattern overlapper: serial compressed-stream generator.
//
// Test patterns of L bits (value/care pairs, bit L-1 shifted first) are
// chained into one bitstream in which each new pattern starts as few bits
// after the previous one as possible. For a new pattern the unit tries shifts
// s = 1..L and takes the smallest s for which the last L-s bits of the stream
// agree with the first L-s bits of the pattern; a don't care on either side
// agrees with anything, and an overlapped don't care in the stream takes the
// pattern's specified value. The pattern then costs only s new stream bits.
// s > 1 means link bits were needed; s = L means no overlap at all.
//
// The stream tail that a later pattern can still overlap is kept in a window
// of L-1 bits; a buffer B of 2L-1 bits (B[0] oldest) holds the window plus the
// new pattern while its s bits are shifted out, one bit per clock on out_*.
// The first pattern of a stream (window empty) is loaded whole: L clocks, of
// which only the last emits a bit, so that the stream is the same as the
// textbook construction and one clock is spent per bit of scan shift.
// flush shifts out the L-1 window bits and empties the window.
//
// Interface: in_valid/in_ready handshake for patterns (in_ready only while
// idle); flush is taken while idle. shift_valid pulses with the chosen s on
// shift when a pattern is accepted. out_valid marks a stream bit; out_care = 0
// marks a don't care that no pattern resolved (out_bit is then 0).
// Timing: a pattern with shift s occupies the unit for s clocks after the
// accepting clock; flush takes L-1 clocks.
// The overlap rule follows the method; the window structure, the serial
// output and the handshake are this design's choices.
module pattern_overlap #(
  parameter int unsigned L = 5,  // pattern length = scan chain cells (example of 5)
  localparam int unsigned SW = $clog2(L + 1),
  localparam int unsigned BL = 2 * L - 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [L-1:0]   in_val,
  input  logic [L-1:0]   in_care,
  input  logic           flush,
  output logic           busy,
  output logic           out_valid,
  output logic           out_bit,
  output logic           out_care,
  output logic           shift_valid,
  output logic [SW-1:0]  shift
);

  typedef enum logic [1:0] {P_IDLE, P_SHIFT, P_FLUSH} p_state_e;

  p_state_e       state;
  logic [BL-1:0]  b_val, b_care, b_vld;   // index 0 = oldest stream bit
  logic [SW-1:0]  remain;
  logic           win_empty;

  // pattern bit p (p = 0 first) in the MSB-first input word
  logic [L-1:0] p_val, p_care;
  always_comb begin
    for (int p = 0; p < L; p++) begin
      p_val[p]  = in_val[L-1-p] & in_care[L-1-p];
      p_care[p] = in_care[L-1-p];
    end
  end

  // smallest compatible shift
  logic [SW-1:0] s_sel;
  always_comb begin
    logic ok, found;
    ok    = 1'b1;
    found = 1'b0;
    s_sel = SW'(L);
    if (!win_empty) begin
      for (int s = 1; s <= L; s++) begin
        ok = 1'b1;
        for (int p = 0; p < L; p++) begin
          // pattern bit p lands on buffer position s-1+p; window is 0..L-2
          if (s - 1 + p < L - 1) begin
            if (b_vld[s-1+p] && b_care[s-1+p] && p_care[p] && (b_val[s-1+p] != p_val[p]))
              ok = 1'b0;
          end
        end
        if (ok && !found) begin
          found = 1'b1;
          s_sel = SW'(s);
        end
      end
    end
  end

  // buffer after placing the pattern at shift s_sel
  logic [BL-1:0] n_val, n_care, n_vld;
  always_comb begin
    n_val  = b_val;
    n_care = b_care;
    n_vld  = b_vld;
    for (int k = L - 1; k < BL; k++) begin
      n_val[k]  = 1'b0;
      n_care[k] = 1'b0;
      n_vld[k]  = 1'b0;
    end
    if (win_empty) begin
      for (int k = 0; k < L - 1; k++) n_vld[k] = 1'b0;
    end
    for (int s = 1; s <= L; s++) begin
      if (SW'(s) == s_sel) begin
        for (int p = 0; p < L; p++) begin
          if (!(n_vld[s-1+p] && n_care[s-1+p])) begin
            n_val[s-1+p]  = p_val[p];
            n_care[s-1+p] = p_care[p];
          end
          n_vld[s-1+p] = 1'b1;
        end
      end
    end
  end

  assign in_ready = (state == P_IDLE);
  assign busy     = (state != P_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= P_IDLE;
      b_val       <= '0;
      b_care      <= '0;
      b_vld       <= '0;
      remain      <= '0;
      win_empty   <= 1'b1;
      out_valid   <= 1'b0;
      out_bit     <= 1'b0;
      out_care    <= 1'b0;
      shift_valid <= 1'b0;
      shift       <= '0;
    end else begin
      out_valid   <= 1'b0;
      shift_valid <= 1'b0;
      unique case (state)
        P_IDLE: begin
          if (in_valid) begin
            b_val       <= n_val;
            b_care      <= n_care;
            b_vld       <= n_vld;
            remain      <= s_sel;
            shift       <= s_sel;
            shift_valid <= 1'b1;
            win_empty   <= 1'b0;
            state       <= P_SHIFT;
          end else if (flush && !win_empty) begin
            remain <= SW'(L - 1);
            state  <= P_FLUSH;
          end
        end
        P_SHIFT, P_FLUSH: begin
          out_valid <= b_vld[0];
          out_bit   <= b_val[0] & b_care[0];
          out_care  <= b_care[0];
          b_val     <= {1'b0, b_val[BL-1:1]};
          b_care    <= {1'b0, b_care[BL-1:1]};
          b_vld     <= {1'b0, b_vld[BL-1:1]};
          remain    <= remain - SW'(1);
          if (remain == SW'(1)) begin
            state <= P_IDLE;
            if (state == P_FLUSH) win_empty <= 1'b1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // a pattern offered while the unit is busy must be held until taken
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           in_valid && !in_ready |=> in_valid && $stable(in_val) && $stable(in_care));

endmodule
