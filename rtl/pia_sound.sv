// pia_sound: reduced 6821 PIA on the sound interface.
//
// On the original board this PIA passes sound commands to a separate sound
// CPU. Here the sounds are played by the host, so the PIA keeps only two
// registers: the port A input register (coin door switches, sampled every
// clock) and the port B sound command register. A CPU write to port B
// (rs = 2) stores the low six bits as the sound command, sets snd_valid and
// gives a one-clock snd_strobe; the host reads the command and clears the
// flag with snd_ack; a write in the same clock as an ack keeps the flag set. Reads: rs 0 gives
// PA, rs 2 gives the command, rs 1 and 3 read 0. Reads are combinational
// on cs; writes take effect at the clock edge with cs & we.
// The two-register reduction and the six command bits follow the design;
// the valid/ack handshake to the host is this design's choice.
module pia_sound (
  input  logic       clk,
  input  logic       rst,
  input  logic       cs,
  input  logic       we,
  input  logic [1:0] rs,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [7:0] pa_in,
  output logic [5:0] snd_cmd,
  output logic       snd_valid,
  output logic       snd_strobe,
  input  logic       snd_ack
);

  logic [7:0] pa_q;
  logic       wr_cmd;

  assign wr_cmd     = cs && we && rs == 2'd2;
  assign snd_strobe = wr_cmd;

  always_ff @(posedge clk) begin
    if (rst) begin
      pa_q      <= '0;
      snd_cmd   <= '0;
      snd_valid <= 1'b0;
    end else begin
      pa_q <= pa_in;
      if (wr_cmd) begin
        snd_cmd   <= wdata[5:0];
        snd_valid <= 1'b1;
      end else if (snd_ack) begin
        snd_valid <= 1'b0;
      end
    end
  end

  always_comb begin
    unique case (rs)
      2'd0: rdata = pa_q;
      2'd2: rdata = {2'b00, snd_cmd};
      default: rdata = 8'h00;
    endcase
  end

endmodule
