// pia_input: reduced, input-only 6821 PIA for the player controls.
//
// The full 6821 (ports A and B with data-direction, output and control
// registers) is replaced here by sampling registers, as designers of
// emulated boards commonly did: port A and port B are input registers
// loaded from pa_in / pb_in on every clock, and the only writable register
// is control register B, because CB2 is what the game uses to select which
// player's controls it reads. Register select follows the 6821 (RS1 RS0 =
// addr[1:0]): 0 reads PA, 1 reads 0 (no CRA), 2 reads PB, 3 reads/writes
// CRB[5:0] (interrupt flags CRB[7:6] read as 0).
// CB2 follows the 6821's "output, set/reset" mode: when CRB[5:4] = 11 it
// equals CRB[3]; in any other mode it is 0. Reads are combinational on cs;
// writes take effect at the clock edge with cs & we. Which registers are
// kept follows the design; the read value of absent registers is this
// design's choice.
module pia_input (
  input  logic       clk,
  input  logic       rst,
  input  logic       cs,
  input  logic       we,
  input  logic [1:0] rs,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [7:0] pa_in,
  input  logic [7:0] pb_in,
  output logic       cb2
);

  logic [7:0] pa_q, pb_q;
  logic [5:0] crb;

  always_ff @(posedge clk) begin
    if (rst) begin
      pa_q <= '0;
      pb_q <= '0;
      crb  <= '0;
    end else begin
      pa_q <= pa_in;
      pb_q <= pb_in;
      if (cs && we && rs == 2'd3) crb <= wdata[5:0];
    end
  end

  always_comb begin
    unique case (rs)
      2'd0: rdata = pa_q;
      2'd2: rdata = pb_q;
      2'd3: rdata = {2'b00, crb};
      default: rdata = 8'h00;
    endcase
  end

  assign cb2 = (crb[5:4] == 2'b11) ? crb[3] : 1'b0;

endmodule
