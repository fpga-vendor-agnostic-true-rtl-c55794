// output_interface: hands the internal random words r[i] to the user as
// external random numbers through a valid/ready handshake.
//
// It holds one word.  A new word from the post-processor is loaded when the
// holding register is empty or is being read in the same clock; otherwise the
// new word is discarded and ovf_o pulses (random words are never queued: a
// late reader simply gets a younger word).  While the noise alarm is raised
// the held word is dropped and arriving words are discarded, so no word
// produced around a detected failure reaches the user.
//
// The block's behaviour (one-word buffer, drop-on-overflow, alarm blocking)
// is this design's choice; the generator only calls for an output stage
// between the internal and the external random numbers, linked to the tests.
//
// Interface: r_i/r_valid_i from the post-processor; alarm_i from the tests;
// data_o/valid_o/ready_i to the user, a word transfers when valid_o && ready_i.
// data_o is stable while valid_o is high and ready_i low (checked by an
// assertion), unless the alarm flushes the word.  Load latency: one clock.
`timescale 1ps / 1ps
module output_interface #(
  parameter int unsigned M = trng_pkg::CODE_M
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic [M-1:0] r_i,
  input  logic         r_valid_i,
  input  logic         alarm_i,
  output logic [M-1:0] data_o,
  output logic         valid_o,
  input  logic         ready_i,
  output logic         ovf_o
);

  logic take, load;

  assign take = valid_o && ready_i;
  assign load = r_valid_i && !alarm_i && (!valid_o || take);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      data_o  <= '0;
      valid_o <= 1'b0;
      ovf_o   <= 1'b0;
    end else begin
      ovf_o <= r_valid_i && !alarm_i && valid_o && !take;
      if (alarm_i)   valid_o <= 1'b0;
      else if (load) valid_o <= 1'b1;
      else if (take) valid_o <= 1'b0;
      if (load) data_o <= r_i;
    end
  end

  // Handshake rule: an offered word stays put until taken or flushed.
  a_hold : assert property (@(posedge clk_i) disable iff (!rst_ni)
    valid_o && !ready_i && !alarm_i |=> valid_o && $stable(data_o));

endmodule
