// global_ctrl: global iteration controller of the DGLDPC decoder.
//
// One global iteration is: the SVNs send their extrinsic LLRs to the SCNs,
// the SCNs run their local decoders, and the SCN results go back to the SVNs.
// The SVN side is combinational, so an iteration is started with a one-cycle
// 'scn_start' and ends with 'scn_done'.  In the cycle of 'scn_done' the SVN
// hard decisions already reflect the new SCN messages; 'all_ok' (every SCN
// sees a codeword) ends decoding as converged, reaching 'max_iter' global
// iterations ends it as not converged, otherwise the next iteration starts at
// once.  'first' is high together with the 'scn_start' of the first
// iteration: the SVN messages then captured by the SCNs must be computed with
// zero SCN-to-SVN messages.  The decoding algorithm bounds the number of
// global iterations; stopping early on a codeword is this design's reading
// of the reported counts of converged codewords and of average iterations
// per codeword.
//
// Interface and timing: 'start' (while idle) begins a codeword; max_iter is
// sampled then (0 acts as 1).  'scn_start' is a one-cycle pulse one cycle
// after 'start' and one cycle after each 'scn_done' that does not end
// decoding, so a global iteration costs the SCN latency plus two cycles.
// 'done' pulses for one cycle after 'finish', with
// 'converged' and 'iter_count' (global iterations run) valid from then until
// the next start.
module global_ctrl #(
  parameter int unsigned IW = 8   // width of the global iteration count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] max_iter,
  input  logic          scn_done,
  input  logic          all_ok,
  output logic          busy,
  output logic          first,
  output logic          scn_start,
  output logic          finish,
  output logic          done,
  output logic          converged,
  output logic [IW-1:0] iter_count
);

  typedef enum logic [1:0] {G_IDLE, G_START, G_WAIT} gstate_t;

  gstate_t       state;
  logic [IW-1:0] iter_lim;
  logic [IW-1:0] iter_next;
  logic          first_q;

  assign iter_next = iter_count + IW'(1);
  assign scn_start = (state == G_START);
  assign first     = scn_start && first_q;
  assign busy      = (state != G_IDLE);
  assign finish    = (state == G_WAIT) && scn_done && (all_ok || iter_next == iter_lim);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= G_IDLE;
      iter_lim   <= '0;
      iter_count <= '0;
      first_q    <= 1'b0;
      done       <= 1'b0;
      converged  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        G_IDLE: if (start) begin
          state      <= G_START;
          iter_lim   <= (max_iter == '0) ? IW'(1) : max_iter;
          iter_count <= '0;
          converged  <= 1'b0;
          first_q    <= 1'b1;
        end
        G_START: state <= G_WAIT;
        G_WAIT: if (scn_done) begin
          iter_count <= iter_next;
          first_q    <= 1'b0;
          if (finish) begin
            converged <= all_ok;
            done      <= 1'b1;
            state     <= G_IDLE;
          end else begin
            state <= G_START;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end

endmodule
