// Pulse counter register for random seed generation. A free-running counter
// runs on the engine clock; every rising edge of the asynchronous `pulse`
// input (an external noise or timing source, synchronised here with two
// flip-flops) folds the counter into the seed: seed = rotl(seed, 7) ^ count.
// Timing jitter between the pulse source and the clock makes the seed
// unpredictable. `events` counts the pulses seen. The fold is this design's
// choice.
module pulse_rng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pulse,   // external pulse source
  output logic [63:0] seed,    // accumulated seed
  output logic [15:0] events   // pulses counted
);
  logic [63:0] cnt;
  logic [2:0]  sync;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; seed <= '0; sync <= '0; events <= '0;
    end else begin
      cnt  <= cnt + 1'b1;
      sync <= {sync[1:0], pulse};
      if (sync[1] && !sync[2]) begin
        seed   <= {seed[56:0], seed[63:57]} ^ cnt;
        events <= events + 1'b1;
      end
    end
  end
endmodule
