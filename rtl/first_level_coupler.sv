// first_level_coupler: the partition module's connection to the SYSTEM
// FIRST-LEVEL backplane line.
//
// A coupled partition drives its X FIRST-LEVEL onto the wired-OR line
// SYSTEM FIRST-LEVEL; an uncoupled one keeps off it. The partition then uses
// X/SYSTEM FIRST-LEVEL: the backplane line when coupled (so every coupled
// partition sees every coupled event), its own X FIRST-LEVEL when not.
// The wired-OR itself is the OR of all drive outputs, formed by whatever
// holds the backplane (the top level here). Purely combinational.
module first_level_coupler (
  input  logic x_first_level,
  input  logic coupled,
  input  logic system_first_level,  // value of the backplane wired-OR
  output logic drive,               // this board's contribution to it
  output logic xsys_first_level     // X/SYSTEM FIRST-LEVEL
);
  assign drive            = x_first_level & coupled;
  assign xsys_first_level = coupled ? system_first_level : x_first_level;
endmodule
