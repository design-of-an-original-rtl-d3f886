// div32: iterative 32-bit divider for div, divu, rem and remu.
//
// A restoring shift-subtract divider that produces one quotient bit per
// clock. Pulse start with the operands and the signed flag; busy stays high
// for 32 cycles, then done pulses for one cycle with quotient and remainder
// valid (they hold until the next start). Signed division works on
// magnitudes and fixes the signs afterwards: the quotient is negative when
// the operand signs differ, the remainder takes the sign of the dividend.
// Division by zero returns quotient all-ones and remainder equal to the
// dividend. The document names the block only; the algorithm, the latency
// (34 cycles from start to done) and the divide-by-zero result are this
// design's choices.
module div32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        is_signed,
  input  logic [31:0] dividend,
  input  logic [31:0] divisor,
  output logic        busy,
  output logic        done,
  output logic [31:0] quotient,
  output logic [31:0] remainder
);
  logic [31:0] q, d;
  logic [32:0] r;
  logic [5:0]  cnt;
  logic        neg_q, neg_r, run, fin;
  logic [32:0] trial;

  assign trial = {r[31:0], q[31]} - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; d <= '0; r <= '0; cnt <= '0;
      neg_q <= 1'b0; neg_r <= 1'b0; run <= 1'b0; fin <= 1'b0;
      quotient <= '0; remainder <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !run) begin
        q     <= (is_signed && dividend[31]) ? -dividend : dividend;
        d     <= (is_signed && divisor[31])  ? -divisor  : divisor;
        neg_q <= is_signed && (dividend[31] ^ divisor[31]) && (divisor != 0);
        neg_r <= is_signed && dividend[31];
        r     <= '0;
        cnt   <= 6'd32;
        run   <= 1'b1;
      end else if (run) begin
        if (!trial[32]) begin
          r <= {1'b0, trial[31:0]};
          q <= {q[30:0], 1'b1};
        end else begin
          r <= {1'b0, r[30:0], q[31]};
          q <= {q[30:0], 1'b0};
        end
        cnt <= cnt - 6'd1;
        if (cnt == 6'd1) begin
          run <= 1'b0;
          fin <= 1'b1;
        end
      end else if (fin) begin
        quotient  <= neg_q ? -q : q;
        remainder <= neg_r ? -r[31:0] : r[31:0];
        done      <= 1'b1;
      end
    end
  end

  assign busy = run | fin;
endmodule
