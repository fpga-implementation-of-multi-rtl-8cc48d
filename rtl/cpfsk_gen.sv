// cpfsk_gen: multi-frequency continuous-phase FSK sample generator.
//
// Each output sample is x[n] = 1/2 cosA cosB -/+ 1/2 sinA sinB = 1/2 cos(A +/- B),
// where A runs at the carrier FC and B at phi_dev*FDEV. Both A and B come
// from a coupled standard quadrature oscillator (equal amplitudes):
//   sin[n+1] = sin(theta) cos[n] + cos(theta) sin[n]
//   cos[n+1] = cos(theta) cos[n] - sin(theta) sin[n]
// As in the document, the two oscillators and the output products are
// evaluated serially on ONE multiplier: 10 products per sample (2 for the
// output, 4 per oscillator update), one per clock. The B rotation
// coefficients for the 8 values phi_dev = 1,3,..,15 form an 8-entry buffer
// selected by a multiplexer; the tone index MSB selects sum (upper tones)
// or difference (lower tones). Because every phi_dev*FDEV and FC complete
// a whole number of cycles in one symbol (fdev = 100 Hz, 10 ms symbols),
// the B phase is back at zero at each symbol boundary, so switching
// coefficients and sign there keeps the phase continuous. For deviations
// where that does not hold (h = 1/2, fdev = 25 Hz) the generator also
// mirrors the B oscillator (sinB -> -sinB) whenever the sign changes, which
// keeps cos(A +/- B) continuous at any phase; this mirroring is this
// design's addition.
//
// Interface/timing: on sample_en the tone index is latched (and, with
// restart, both oscillators return to cos = 1, sin = 0); the sequencer then
// runs 10 cycles. The output products come first, so sample_valid pulses
// with the new sample 3 clocks after sample_en; busy stays high for 10
// clocks after sample_en, and sample_en must not come while busy. Fixed point: oscillator state
// and coefficients are OSC_W-bit Q2.(OSC_W-2); sample is Q1.(SAMPLE_W-1)
// with peak 0.5 (the 1/2 factor of the document's equation). Word widths
// and the cycle schedule are this design's choices.
module cpfsk_gen
  import mcpfsk_pkg::*;
#(
  parameter int FS_HZ    = 8000,
  parameter int FC_HZ    = 1900,
  parameter int FDEV_HZ  = 100,
  parameter int SAMPLE_W = 16,
  parameter int OSC_W    = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       restart,
  input  logic                       sample_en,
  input  nibble_t                    tone,
  output logic signed [SAMPLE_W-1:0] sample,
  output logic                       sample_valid,
  output logic                       busy
);
  localparam int  FRAC = OSC_W - 2;
  localparam real ONE_R = real'(longint'(1) << FRAC);
  localparam logic signed [OSC_W-1:0] ONE = OSC_W'(longint'(1) << FRAC);

  typedef logic signed [OSC_W-1:0] q_t;

  // Carrier (A) rotation coefficients.
  localparam q_t COS_A = OSC_W'(q_cos(real'(FC_HZ), real'(FS_HZ), ONE_R));
  localparam q_t SIN_A = OSC_W'(q_sin(real'(FC_HZ), real'(FS_HZ), ONE_R));

  // Deviation (B) coefficient buffer: entry d holds phi_dev = 2d+1.
  typedef logic [N_DEV-1:0][OSC_W-1:0] coef_buf_t;

  function automatic coef_buf_t dev_coefs(input bit want_sin);
    coef_buf_t b;
    for (int d = 0; d < N_DEV; d++)
      b[d] = want_sin ? OSC_W'(q_sin(real'((2*d+1)*FDEV_HZ), real'(FS_HZ), ONE_R))
                      : OSC_W'(q_cos(real'((2*d+1)*FDEV_HZ), real'(FS_HZ), ONE_R));
    return b;
  endfunction

  localparam coef_buf_t COS_B_BUF = dev_coefs(1'b0);
  localparam coef_buf_t SIN_B_BUF = dev_coefs(1'b1);

  // Multiplexer selecting the B coefficients of a tone.
  logic [2:0] dev_sel;
  assign dev_sel = tone[SYM_BITS-1] ? tone[2:0] : ~tone[2:0];

  // Oscillator state.
  q_t ca, sa, cb, sb;
  // Latched symbol controls.
  logic             upper;     // 1: x = cos(A+B), 0: x = cos(A-B)
  q_t               cth_b, sth_b;

  // Sequencer.
  logic [3:0] step;
  logic       run;
  q_t         acc;             // first product of a pair
  q_t         m_op0, m_op1;
  logic signed [2*OSC_W-1:0] prod;
  q_t         prod_q;

  assign busy = run;

  // Multiplexed operands for the single multiplier.
  always_comb begin
    unique case (step)
      4'd0:    begin m_op0 = ca; m_op1 = cb;    end  // cosA*cosB
      4'd1:    begin m_op0 = sa; m_op1 = sb;    end  // sinA*sinB
      4'd2:    begin m_op0 = SIN_A; m_op1 = ca; end  // sinA[n+1] = sth*cos
      4'd3:    begin m_op0 = COS_A; m_op1 = sa; end  //          + cth*sin
      4'd4:    begin m_op0 = COS_A; m_op1 = ca; end  // cosA[n+1] = cth*cos
      4'd5:    begin m_op0 = SIN_A; m_op1 = sa; end  //          - sth*sin
      4'd6:    begin m_op0 = sth_b; m_op1 = cb; end
      4'd7:    begin m_op0 = cth_b; m_op1 = sb; end
      4'd8:    begin m_op0 = cth_b; m_op1 = cb; end
      4'd9:    begin m_op0 = sth_b; m_op1 = sb; end
      default: begin m_op0 = '0; m_op1 = '0;    end
    endcase
  end

  assign prod   = m_op0 * m_op1;
  // Round to nearest and return to Q2.FRAC.
  assign prod_q = q_t'((prod + (2*OSC_W)'(longint'(1) << (FRAC-1))) >>> FRAC);

  // Output sample: (m1 -/+ m2)/2 from Q2.FRAC to Q1.(SAMPLE_W-1).
  q_t x_full;
  assign x_full = upper ? (acc - prod_q) : (acc + prod_q);

  q_t new_sa, new_sb;          // hold the updated sines until both products are done

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ca <= ONE; sa <= '0; cb <= ONE; sb <= '0;
      upper <= 1'b0; cth_b <= '0; sth_b <= '0;
      step <= '0; run <= 1'b0; acc <= '0;
      new_sa <= '0; new_sb <= '0;
      sample <= '0; sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (sample_en && !run) begin
        if (restart) begin
          ca <= ONE; sa <= '0; cb <= ONE; sb <= '0;
        end else if (tone[SYM_BITS-1] != upper) begin
          // Sum <-> difference switch: mirror B (sinB -> -sinB) so that
          // cos(A +/- B) carries on from the same phase.
          sb <= -sb;
        end
        upper <= tone[SYM_BITS-1];
        cth_b <= q_t'(COS_B_BUF[dev_sel]);
        sth_b <= q_t'(SIN_B_BUF[dev_sel]);
        step  <= '0;
        run   <= 1'b1;
      end else if (run) begin
        step <= step + 1'b1;
        unique case (step)
          4'd0, 4'd2, 4'd4, 4'd6, 4'd8: acc <= prod_q;
          4'd1: begin
            sample       <= SAMPLE_W'(x_full >>> (FRAC + 1 - (SAMPLE_W-1)));
            sample_valid <= 1'b1;
          end
          4'd3: new_sa <= acc + prod_q;
          4'd5: begin ca <= acc - prod_q; sa <= new_sa; end
          4'd7: new_sb <= acc + prod_q;
          4'd9: begin cb <= acc - prod_q; sb <= new_sb; run <= 1'b0; end
          default: ;
        endcase
      end
    end
  end

  // Products for the new sine (steps 2,3) read ca and sa before step 5 writes them.
  assert property (@(posedge clk) disable iff (!rst_n) sample_en |-> !run)
    else $error("cpfsk_gen: sample_en while busy");

endmodule
