// tmr_reg: register protected by triple modular redundancy.
//
// Three copies of the register hold the same value; the output is their
// bitwise majority (tmr_vote). When en is high all three copies load d;
// when en is low each copy reloads the voted value, so a single-event upset
// in one copy is outvoted immediately and scrubbed at the next clock edge.
// Asynchronous active-low reset to RESET_VAL. Output q is available in the
// same cycle as the copies (one voter delay after the clock).
// The use of TMR on all digital logic follows the chip description; the
// voted feedback (scrubbing) is this design's choice.
module tmr_reg #(
  parameter int unsigned     WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] r0, r1, r2;
  logic [WIDTH-1:0] nxt;

  tmr_vote #(.WIDTH(WIDTH)) u_vote (.a(r0), .b(r1), .c(r2), .y(q));

  always_comb nxt = en ? d : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= RESET_VAL;
      r1 <= RESET_VAL;
      r2 <= RESET_VAL;
    end else begin
      r0 <= nxt;
      r1 <= nxt;
      r2 <= nxt;
    end
  end
endmodule
