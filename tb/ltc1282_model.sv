// Behavioural model of the LTC1282 12-bit A/D converter (not synthesizable).
//
// Only the behaviour the controller relies on: with HBEN low, CS and RD
// low start a conversion; BUSY falls after T_BUSY_NS and stays low for
// T_CONV_NS (6 us maximum for the real part); when it rises the result
// code is on D11..D0. The analog input is given here as the code ain that
// the conversion will return. The dead input, when high, makes the model
// ignore the controller (BUSY stays high) to exercise the timeout.
`timescale 1ns/1ps
module ltc1282_model #(
  parameter int T_BUSY_NS = 80,
  parameter int T_CONV_NS = 6000
) (
  input  logic        cs_n,
  input  logic        rd_n,
  input  logic        hben,
  input  logic [11:0] ain,
  input  logic        dead,
  output logic        busy_n,
  output logic [11:0] d,
  output int          conversions
);
  initial begin
    busy_n = 1'b1; d = '0; conversions = 0;
    forever begin
      @(negedge rd_n);
      if (!cs_n && !hben && !dead) begin
        #(T_BUSY_NS) busy_n = 1'b0;
        #(T_CONV_NS) begin d = ain; busy_n = 1'b1; conversions++; end
      end
    end
  end
endmodule
