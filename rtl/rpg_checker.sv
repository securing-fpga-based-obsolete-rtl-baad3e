// rpg_checker: runtime pin grounding (RPG) check.
//
// Every unused user I/O pin of the FPGA is given a net name in the top level and a
// pull-down in the pin constraints, so it should always read 0. Because an untrusted CAD
// tool can silently undo that pin configuration, this block NORs all those pins and
// samples the result every clock: pins_grounded is 1 when every pin read 0 in the last
// cycle, and pin_alarm latches as soon as one pin was seen high. The NOR check every
// cycle follows the scheme; the sticky alarm output and its reset are this design's
// choices. The default pin count is the Nexys-3 user I/O count (232) less the pins the
// top level uses.
//
// Interface: clk, synchronous active-low rst_n, unused_pins, pins_grounded, pin_alarm.
// Timing: one register stage.
module rpg_checker #(
  parameter int unsigned NUM_UNUSED = hmtd_pkg::NUM_UNUSED
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_UNUSED-1:0] unused_pins,
  output logic                  pins_grounded,
  output logic                  pin_alarm
);

  logic nor_all;
  assign nor_all = ~|unused_pins;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pins_grounded <= 1'b1;
      pin_alarm     <= 1'b0;
    end else begin
      pins_grounded <= nor_all;
      if (!nor_all) pin_alarm <= 1'b1;
    end
  end

  a_alarm_sticky: assert property (@(posedge clk) disable iff (!rst_n)
                                   pin_alarm |=> pin_alarm);

endmodule
