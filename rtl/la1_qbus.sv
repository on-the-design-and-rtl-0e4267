// la1_qbus: the shared read-data bus of a multi-bank LA-1 device.
//
// Every bank has its own DDR output (q) and output enable (q_oe). In the
// reference design the banks are joined with tristate buffers; here the bus is the
// logic equivalent of that wired connection: each bank's beats are gated by
// its enable and the gated values are ORed, so Q carries the one enabled
// bank's data and is 0 when no bank drives. bus_oe tells that some bank
// drives Q; conflict flags two or more enabled banks, the case in which real
// tristate drivers would fight. Purely combinational.
module la1_qbus
  import la1_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4
) (
  input  beat_t                q_bank  [NUM_BANKS],
  input  logic [NUM_BANKS-1:0] oe_bank,
  output beat_t                q,
  output logic                 bus_oe,
  output logic                 conflict
);

  always_comb begin
    q = '0;
    for (int i = 0; i < NUM_BANKS; i++) begin
      q |= q_bank[i] & {DQ_WIDTH{oe_bank[i]}};
    end
  end

  assign bus_oe   = |oe_bank;
  assign conflict = (oe_bank & (oe_bank - NUM_BANKS'(1))) != '0;

endmodule
