// pcolor_counter: global procedure-colour (P-color) counter.
//
// The counter is incremented on every procedure call and decremented on every
// procedure return, so nested and recursive calls keep counting up before they
// count down. Its value is concatenated to the symbolic address of stack
// accesses so that the same $sp/$s8 + displacement in a caller and in its
// callees fall on different symbolic lines. The increment/decrement rule and
// the free choice of width follow the design; PCOLOR_BITS = 2 is the width the
// design evaluates as its main configuration. The counter wraps modulo
// 2**PCOLOR_BITS (only the low bits are ever used), resets to zero, and a call
// and a return in the same cycle cancel out: those are this implementation's choices.
//
// Timing: pcolor changes on the clock edge after call/ret is sampled, so an
// instruction fetched after a call in a later cycle sees the new colour.
module pcolor_counter #(
  parameter int unsigned PCOLOR_BITS = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   call,
  input  logic                   ret,
  output logic [PCOLOR_BITS-1:0] pcolor
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      pcolor <= '0;
    else if (call && !ret)
      pcolor <= pcolor + 1'b1;
    else if (ret && !call)
      pcolor <= pcolor - 1'b1;
  end

endmodule
