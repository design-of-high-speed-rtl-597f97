// booth_seq: sequential radix-2 Booth multiplier, p = a * b (signed).
//
// The add/subtract-and-shift loop of the Booth flowchart: A is cleared,
// Q holds the multiplier, Q-1 is 0 and a counter starts at N. Each step
// looks at the pair {Q0, Q-1}: 10 subtracts the multiplicand M from A,
// 01 adds it, 00 and 11 leave A alone; then {A, Q, Q-1} is shifted one
// place right arithmetically and the counter decremented. After N steps
// {A, Q} is the product. The addition uses a square-root carry select
// adder and -M is formed once, at start, by the conversion-signal two's
// complementer.
//
// The algorithm follows the paper's flowchart. This design's choices: one
// step (add or subtract, then shift) per clock, A one bit wider than M so
// that M = -2^(N-1) is exact, the start/busy/done handshake and the
// asynchronous active-low reset.
//
// Interface and timing: start is taken when the unit is idle (busy low);
// a and b are sampled then. busy is high for N clocks; done pulses for one
// clock with p valid on the N-th clock edge after the start edge, and p
// holds until the next start.
module booth_seq #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,       // multiplicand M
  input  logic [N-1:0]   b,       // multiplier Q
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e               state;
  logic [N:0]           acc;      // A, one guard bit
  logic [N-1:0]         q;        // Q
  logic                 q_m1;     // Q-1
  logic [N:0]           m_pos;    // +M, sign extended
  logic [N:0]           m_neg;    // -M
  logic [$clog2(N+1)-1:0] count;

  logic [N:0] m_neg_n, addend, sum;
  logic       unused_cout;

  twos_comp #(.W(N + 1)) u_neg (.a((N+1)'($signed(a))), .y(m_neg_n));

  always_comb begin
    unique case ({q[0], q_m1})
      2'b10:   addend = m_neg;
      2'b01:   addend = m_pos;
      default: addend = '0;
    endcase
  end

  sqrt_csla #(.N(N + 1)) u_add (
    .a(acc), .b(addend), .cin(1'b0), .s(sum), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      acc   <= '0;
      q     <= '0;
      q_m1  <= 1'b0;
      m_pos <= '0;
      m_neg <= '0;
      count <= '0;
      done  <= 1'b0;
      p     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          acc   <= '0;
          q     <= b;
          q_m1  <= 1'b0;
          m_pos <= (N+1)'($signed(a));
          m_neg <= m_neg_n;
          count <= ($clog2(N+1))'(N);
          state <= S_RUN;
        end
        S_RUN: begin
          // add or subtract, then arithmetic shift right of {A, Q, Q-1}
          {acc, q, q_m1} <= {sum[N], sum, q};
          count <= count - 1'b1;
          if (count == 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
            p     <= {sum, q[N-1:1]};
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);

  // done marks the return to idle, so it is never high together with busy
  a_done_idle: assert property (@(posedge clk) done |-> !busy);

endmodule
