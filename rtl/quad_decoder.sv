// quad_decoder: quadrature decoder FSM with fourfold resolution.
//
// The state is the last accepted level pair {A,B}. On each Tenc strobe the
// filtered channels are compared with the state. A step to a neighbouring
// Gray-code state gives one count pulse, so every rising and falling edge of
// both channels counts (four counts per encoder line), and sets the
// direction output. The sequence 00 -> 01 -> 11 -> 10 -> 00 (B leading A)
// counts up, the reverse counts down. A jump over a state (both channels
// changed between two strobes) is not counted; the state still follows the
// inputs.
//
// Follows the encoder design in what the FSM produces: a count pulse per
// edge and an up/down signal to an up/down counter. The state encoding, the
// direction convention and the handling of illegal jumps are this design's
// own choices.
//
// Interface: clk, rst (synchronous), t (Tenc strobe), a, b (filtered
// channels); count is a one-cycle pulse registered one clock after the
// strobe, up holds the direction of the last counted step.
module quad_decoder (
  input  logic clk,
  input  logic rst,
  input  logic t,
  input  logic a,
  input  logic b,
  output logic count,
  output logic up
);
  typedef enum logic [1:0] {S00 = 2'b00, S01 = 2'b01, S11 = 2'b11, S10 = 2'b10} qstate_e;

  qstate_e state, next_in;

  assign next_in = qstate_e'({a, b});

  // Successor of a state in the counting-up direction.
  function automatic qstate_e succ(input qstate_e s);
    case (s)
      S00:     return S01;
      S01:     return S11;
      S11:     return S10;
      default: return S00;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= qstate_e'({a, b});
      count <= 1'b0;
      up    <= 1'b1;
    end else begin
      count <= 1'b0;
      if (t && next_in != state) begin
        state <= next_in;
        if (next_in == succ(state)) begin
          count <= 1'b1;
          up    <= 1'b1;
        end else if (succ(next_in) == state) begin
          count <= 1'b1;
          up    <= 1'b0;
        end
      end
    end
  end
endmodule
