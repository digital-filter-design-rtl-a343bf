// booth_r2_multiplier: sequential radix-2 Booth multiplier.
//
// Follows the document's Booth flowchart. On start the accumulator A and the
// extra bit Q-1 are cleared, M takes the multiplicand, Q the multiplier and
// the counter the operand width. Each clock cycle performs one step: the
// pair {Q0, Q-1} selects A = A - M (10), A = A + M (01) or nothing (00, 11);
// then {A, Q, Q-1} is shifted right arithmetically and the counter counts
// down. When it reaches zero {A, Q} holds the signed product.
// The document does not give A's width; here A has WIDTH+1 bits so that
// subtracting the most negative multiplicand cannot overflow. Handshake,
// reset and one step per clock are this design's choices.
//
// Interface: start is taken when the unit is idle (busy low) and loads the
// operands. busy is high for the WIDTH step cycles; done pulses for one cycle
// in the cycle after the last step, with product valid from then until the
// next start. Latency: done is seen WIDTH+1 clock edges after the edge that
// takes start. step_op shows the operation of the step under way (for
// observation). Asynchronous active-low reset.
module booth_r2_multiplier #(
  parameter int unsigned WIDTH = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [WIDTH-1:0]  multiplicand,
  input  logic signed [WIDTH-1:0]  multiplier,
  output logic                     busy,
  output logic                     done,
  output logic signed [2*WIDTH-1:0] product,
  output logic [1:0]               step_op    // 2'b10 subtract, 2'b01 add, else none
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic signed [WIDTH:0]   a_q;    // accumulator A, one guard bit
  logic        [WIDTH-1:0] q_q;    // multiplier register Q
  logic                    q1_q;   // Q-1
  logic signed [WIDTH:0]   m_q;    // multiplicand M, sign-extended
  logic        [CW-1:0]    cnt_q;  // steps left

  logic signed [WIDTH:0]   a_sum;  // A after the add/subtract of this step

  assign step_op = {q_q[0], q1_q} & {2{busy}};

  always_comb begin
    unique case ({q_q[0], q1_q})
      2'b10:   a_sum = a_q - m_q;
      2'b01:   a_sum = a_q + m_q;
      default: a_sum = a_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      q_q   <= '0;
      q1_q  <= 1'b0;
      m_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q   <= '0;
          q1_q  <= 1'b0;
          m_q   <= (WIDTH+1)'(multiplicand);
          q_q   <= multiplier;
          cnt_q <= CW'(WIDTH);
          busy  <= 1'b1;
        end
      end else begin
        // arithmetic shift right of {A, Q, Q-1}
        {a_q, q_q, q1_q} <= {a_sum[WIDTH], a_sum, q_q};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign product = {a_q[WIDTH-1:0], q_q};

endmodule
