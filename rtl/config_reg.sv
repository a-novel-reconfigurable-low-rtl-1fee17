// config_reg: the "reconfigurable bits" that set every routing matrix.
//
// A new configuration is shifted in serially, one bit per clock while
// cfg_shift is high, into a shadow chain: cfg_sdi enters at the top and the
// chain moves towards bit 0, so after N shifts the first bit sent sits in
// bit 0. cfg_sdo is bit 0 of the chain, for daisy-chaining. A one-cycle
// cfg_commit copies the shadow chain into the active register, so the
// datapath keeps running on the old configuration while the next one loads
// and switches in a single cycle (cfg takes the new value on the clock edge
// after cfg_commit). Synchronous active-low reset: the active register takes
// RESET_VAL (the datapath's power-on mode), the shadow chain clears.
// The source design names the configuration bits only; the serial loading,
// shadow/commit scheme and reset preset are this implementation's choices.
module config_reg #(
  parameter int          N         = 1492,
  parameter logic [N-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_shift,
  input  logic         cfg_sdi,
  input  logic         cfg_commit,
  output logic         cfg_sdo,
  output logic [N-1:0] cfg
);

  logic [N-1:0] shadow;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shadow <= '0;
      cfg    <= RESET_VAL;
    end else begin
      if (cfg_shift)  shadow <= {cfg_sdi, shadow[N-1:1]};
      if (cfg_commit) cfg    <= shadow;
    end
  end

  assign cfg_sdo = shadow[0];

  // Committing while shifting would load a half-shifted word.
  a_no_commit_while_shift: assert property (@(posedge clk) disable iff (!rst_n)
    !(cfg_shift && cfg_commit));

endmodule
