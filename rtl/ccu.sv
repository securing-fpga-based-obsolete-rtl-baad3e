// ccu: consistency checking unit of the HMTD scheme.
//
// Compares the outputs of the two randomly selected replicas every clock. While they
// agree, the result is registered and driven to legacy unit U1. When they differ, a
// Trojan has changed one copy: the registered M-bit output is forced to zero (the output
// pins are grounded) and trojan_flag is set, so the differing value never reaches U1.
// Flag and grounding are sticky until reset, i.e. the replacement stops operating
// (this design's reading of "terminate"); reset behaviour is this design's choice.
//
// Interface: clk, synchronous active-low rst_n, out_a/out_b (from Rout), dout (to U1),
// trojan_flag (detection flag, drives an LED on the board).
// Timing: one register stage; dout and trojan_flag reflect the comparison of the
// previous clock cycle.
module ccu #(
  parameter int unsigned M_OUT = hmtd_pkg::M_OUT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [M_OUT-1:0] out_a,
  input  logic [M_OUT-1:0] out_b,
  output logic [M_OUT-1:0] dout,
  output logic             trojan_flag
);

  logic mismatch;
  assign mismatch = (out_a != out_b);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout        <= '0;
      trojan_flag <= 1'b0;
    end else if (trojan_flag || mismatch) begin
      dout        <= '0;
      trojan_flag <= 1'b1;
    end else begin
      dout        <= out_a;
    end
  end

  // Once raised, the flag stays up, and the output stays grounded, until reset.
  a_flag_sticky: assert property (@(posedge clk) disable iff (!rst_n)
                                  trojan_flag |=> trojan_flag);
  a_grounded:    assert property (@(posedge clk) disable iff (!rst_n)
                                  trojan_flag |-> dout == '0);

endmodule
