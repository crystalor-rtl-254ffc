// crystalor_pkg: types and helpers shared by the Crystalor blocks.
//
// ph_op_e selects what the PXOR-Hash engine does with a request:
//   PH_UPDATE  incremental update delta E_K(iL^D[i]) ^ E_K(iL^D'[i]) (two AES calls)
//   PH_GEN     one TagGen term E_K(iL^D[i]) xored into the running tag
//   PH_RAW     plain E_K(x), used once to derive the mask L = E_K(0)
// rec_cmd_e is the command set of the recovery controller.
package crystalor_pkg;

  typedef enum logic [1:0] {
    PH_UPDATE = 2'd0,
    PH_GEN    = 2'd1,
    PH_RAW    = 2'd2
  } ph_op_e;

  typedef enum logic [1:0] {
    CMD_SETUP   = 2'd0,  // compute and store L = E_K(0) for the loaded key
    CMD_INIT    = 2'd1,  // compute the leaf tag over all leaf counters and store it
    CMD_RECOVER = 2'd2   // post-crash recovery: new tree, then leaf tag verification
  } rec_cmd_e;

  // Doubling in GF(2^128), polynomial x^128 + x^7 + x^2 + x + 1, bit 127 = x^127.
  function automatic logic [127:0] gf128_double(input logic [127:0] x);
    return {x[126:0], 1'b0} ^ (x[127] ? 128'h87 : 128'h0);
  endfunction

endpackage
