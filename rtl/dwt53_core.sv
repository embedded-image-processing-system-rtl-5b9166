// dwt53_core: one-dimensional LeGall 5/3 wavelet transform, forward and
// inverse, computed in place by integer lifting.
//
// The host loads a line of N samples (N even, 4 <= N <= MAXN) through the
// write port, pulses start with inverse chosen, waits for done and reads the
// result back. The line is held in a register array in interleaved order:
// even positions hold low-pass (Y(2n)) values, odd positions high-pass
// (Y(2n+1)) values. The equations are those of JPEG-2000 reversible 5/3:
//   forward  Y(2n+1) = X(2n+1) - floor((X(2n) + X(2n+2)) / 2)
//            Y(2n)   = X(2n)   + floor((Y(2n-1) + Y(2n+1) + 2) / 4)
//   inverse  X(2n)   = Y(2n)   - floor((Y(2n-1) + Y(2n+1) + 2) / 4)
//            X(2n+1) = Y(2n+1) + floor((X(2n) + X(2n+2)) / 2)
// Samples outside the line are taken by symmetric extension (X(N) = X(N-2),
// Y(-1) = Y(1)), which is this design's choice for the line ends.
//
// Each lifting pass updates one position per clock, odd positions first for
// the forward transform and even positions first for the inverse, so a line
// takes exactly N clocks from the cycle after start until done pulses.
// The host ports (addr, wdata, rdata) address the array directly in
// interleaved order; rdata is combinational. Writes are ignored while busy.
// Samples are DW-bit two's complement; the sums inside the lifting steps are
// kept at full width, so the forward/inverse pair is exactly lossless as long
// as the coefficients fit in DW bits (16 bits covers two or more levels of an
// 8-bit image).
module dwt53_core #(
  parameter int unsigned DW   = 16,
  parameter int unsigned MAXN = 512,
  localparam int unsigned AW  = $clog2(MAXN)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host access to the line buffer
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic signed [DW-1:0] wdata,
  output logic signed [DW-1:0] rdata,
  // control
  input  logic                 start,
  input  logic                 inverse,
  input  logic [AW:0]          len,     // N, even
  output logic                 busy,
  output logic                 done     // one-cycle pulse
);

  typedef enum logic [1:0] {S_IDLE, S_PASS1, S_PASS2} state_e;

  logic signed [DW-1:0] line_q [MAXN];
  state_e               state_q;
  logic                 inv_q;
  logic [AW:0]          n_q;
  logic [AW:0]          k_q;        // position being updated

  // Neighbours of position k with symmetric extension at both ends.
  logic [AW-1:0]        k_left, k_right;
  logic signed [DW-1:0] s_left, s_right, s_mid;
  logic signed [DW+1:0] predict, update, sum2, sum4;
  logic signed [DW-1:0] result;
  logic                 pass_last;

  always_comb begin
    k_left  = AW'((k_q == '0) ? k_q + 1'b1 : k_q - 1'b1);
    k_right = AW'((k_q + 1'b1 >= n_q) ? k_q - 1'b1 : k_q + 1'b1);
    s_left  = line_q[k_left];
    s_right = line_q[k_right];
    s_mid   = line_q[k_q[AW-1:0]];
    sum2    = (DW+2)'(s_left) + (DW+2)'(s_right);
    sum4    = sum2 + (DW+2)'(2);
    predict = sum2 >>> 1;           // floor((a+b)/2)
    update  = sum4 >>> 2;           // floor((a+b+2)/4)
    // Odd positions carry the predict step, even positions the update step;
    // the sign depends on the direction of the transform.
    if (k_q[0]) result = inv_q ? DW'((DW+2)'(s_mid) + predict) : DW'((DW+2)'(s_mid) - predict);
    else        result = inv_q ? DW'((DW+2)'(s_mid) - update)  : DW'((DW+2)'(s_mid) + update);
    pass_last = (k_q + (AW+1)'(2) >= n_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      inv_q   <= 1'b0;
      n_q     <= '0;
      k_q     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_PASS1;
          inv_q   <= inverse;
          n_q     <= len;
          k_q     <= inverse ? '0 : (AW+1)'(1);   // forward: odd first; inverse: even first
        end
        S_PASS1: begin
          if (pass_last) begin
            state_q <= S_PASS2;
            k_q     <= inv_q ? (AW+1)'(1) : '0;
          end else begin
            k_q <= k_q + (AW+1)'(2);
          end
        end
        S_PASS2: begin
          if (pass_last) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            k_q <= k_q + (AW+1)'(2);
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Line buffer: host writes while idle, lifting writes while busy.
  always_ff @(posedge clk) begin
    if (state_q != S_IDLE)   line_q[k_q[AW-1:0]] <= result;
    else if (we)             line_q[addr]        <= wdata;
  end

  assign rdata = line_q[addr];
  assign busy  = (state_q != S_IDLE);

  // The length must be even and at least 4 when a transform is started.
  a_len_ok: assert property (@(posedge clk) disable iff (!rst_n)
                             (start && state_q == S_IDLE) |-> (len[0] == 1'b0 && len >= 4 && 32'(len) <= MAXN));

endmodule
