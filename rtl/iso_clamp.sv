// iso_clamp: isolation clamps between the switchable core power domain and
// the always-on WIC and PMU.
//
// While isolaten is low every bit is forced to 0, so a powered-down core
// cannot drive unknown values into the always-on logic; while it is high the
// signals pass unchanged. The clamp-to-0 value is the one marked on the
// clamps of the WIC interfacing figure. Purely combinational.
module iso_clamp #(
  parameter int unsigned W = 1
) (
  input  logic         isolaten,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  assign q = isolaten ? d : '0;

endmodule
