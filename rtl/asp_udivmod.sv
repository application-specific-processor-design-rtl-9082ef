// asp_udivmod: 32-bit unsigned divider for the UDIV and UMOD instructions.
//
// Restoring radix-2 division, one quotient bit per clock. A one-cycle start
// pulse loads dividend and divisor; busy is high while it iterates and done
// pulses for one cycle when quotient and remainder are valid, WIDTH cycles
// after start. Division by zero returns quotient all ones and remainder equal
// to the dividend. The design only says that division and mod instructions
// were added; the iterative structure, its latency and the divide-by-zero
// result are this implementation's own choices. Reset is active low, async.
module asp_udivmod #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);
  localparam int CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] q_r, d_r;
  logic [WIDTH:0]   rem_r;
  logic [CW-1:0]    cnt_r;
  logic [WIDTH:0]   trial;
  logic [WIDTH:0]   shifted;

  always_comb begin
    shifted = {rem_r[WIDTH-1:0], q_r[WIDTH-1]};
    trial   = shifted - {1'b0, d_r};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r   <= '0;
      d_r   <= '0;
      rem_r <= '0;
      cnt_r <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q_r   <= dividend;
        d_r   <= divisor;
        rem_r <= '0;
        cnt_r <= CW'(WIDTH);
        busy  <= 1'b1;
      end else if (busy) begin
        if (trial[WIDTH]) begin
          rem_r <= shifted;
          q_r   <= {q_r[WIDTH-2:0], 1'b0};
        end else begin
          rem_r <= trial;
          q_r   <= {q_r[WIDTH-2:0], 1'b1};
        end
        cnt_r <= cnt_r - 1'b1;
        if (cnt_r == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q_r;
  assign remainder = rem_r[WIDTH-1:0];
endmodule
