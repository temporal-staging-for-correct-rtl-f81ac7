// temporal_staging_top: the temporally staged devices side by side.
//
// Four independent Mealy-machine devices share only clock and reset:
//   b2_*    blake2b_staged: BLAKE2b compression F in three staged
//           transitions, W64x4 command input, W64x8 Val output
//   csa_*   csa:  carry-save adder taking a, b, c on successive cycles
//   pcsa_*  pcsa: the same adder staged into a ten-cycle register schedule
//   acsa_*  acsa: the staged adder with commands in any order and Go
// Every port is the corresponding port of the device (see each module for
// its timing). The devices do not interact; the grouping into one top is
// this design's own.
module temporal_staging_top
  import blake2b_pkg::*;
  import csa_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // BLAKE2b compression device
  input  b2_cmd_e    b2_cmd,
  input  logic [1:0] b2_idx,
  input  word_t      b2_data [4],
  output logic       b2_val,
  output word_t      b2_h    [8],
  output logic       b2_busy,
  // simple carry-save adder
  input  logic [7:0] csa_in,
  output logic       csa_val,
  output logic [7:0] csa_carry,
  output logic [7:0] csa_sum,
  output logic       csa_ready,
  // pipelined-input carry-save adder
  input  logic [7:0] pcsa_in,
  output logic       pcsa_val,
  output logic [7:0] pcsa_carry,
  output logic [7:0] pcsa_sum,
  output logic       pcsa_ready,
  // asynchronous-input carry-save adder
  input  acsa_cmd_e  acsa_cmd,
  input  logic [7:0] acsa_in,
  output logic       acsa_val,
  output logic [7:0] acsa_carry,
  output logic [7:0] acsa_sum,
  output logic       acsa_busy
);

  blake2b_staged u_blake2b (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_cmd (b2_cmd),
    .in_idx (b2_idx),
    .in_data(b2_data),
    .out_val(b2_val),
    .out_h  (b2_h),
    .busy   (b2_busy)
  );

  csa u_csa (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_data  (csa_in),
    .out_val  (csa_val),
    .out_carry(csa_carry),
    .out_sum  (csa_sum),
    .ready    (csa_ready)
  );

  pcsa u_pcsa (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_data  (pcsa_in),
    .out_val  (pcsa_val),
    .out_carry(pcsa_carry),
    .out_sum  (pcsa_sum),
    .ready    (pcsa_ready)
  );

  acsa u_acsa (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_cmd   (acsa_cmd),
    .in_data  (acsa_in),
    .out_val  (acsa_val),
    .out_carry(acsa_carry),
    .out_sum  (acsa_sum),
    .busy     (acsa_busy)
  );

endmodule
