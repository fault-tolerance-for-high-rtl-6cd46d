// mr_pkg: constants and types shared by the micro-rollback blocks.
//
// The register-file geometry (64 registers of 32 bits) and the 3-bit
// rollback buses between transducers follow the example design; the
// request/response bundles of a rollback-capable node are this design's own
// grouping of the signals a processor or coprocessor core drives into its
// rollback hardware.
package mr_pkg;

  localparam int unsigned DW    = 32;  // register width
  localparam int unsigned NREG  = 64;  // registers in a register file
  localparam int unsigned AW    = $clog2(NREG);
  localparam int unsigned CW    = 4;   // width of a cycle-count bus in the top

  // What a core drives into its rollback hardware in one cycle.
  typedef struct packed {
    logic          we;         // register-file write
    logic [AW-1:0] waddr;
    logic [DW-1:0] wdata;
    logic [AW-1:0] raddr0;     // read port 0 (bus 1)
    logic [AW-1:0] raddr1;     // read port 1 (bus 2)
    logic          st_load;    // load the state register (e.g. a PC)
    logic [DW-1:0] st_d;
    logic          rb_req;     // error checker asks for a rollback
    logic [CW-1:0] rb_cycles;  // ... of this many local cycles
  } node_req_t;

  // What the rollback hardware returns to the core.
  typedef struct packed {
    logic [DW-1:0] rdata0;
    logic [DW-1:0] rdata1;
    logic [DW-1:0] st_q;
    logic          rb_apply;   // a rollback was applied this cycle
    logic [CW-1:0] rb_cycles;  // ... of this many local cycles
    logic          error;      // a rollback checker fired
  } node_rsp_t;

  // Number of ones in the lowest n bits of v (n <= 32).
  function automatic int unsigned ones_below(logic [31:0] v, int unsigned n);
    int unsigned c = 0;
    for (int unsigned i = 0; i < 32; i++)
      if (i < n && v[i]) c++;
    return c;
  endfunction

endpackage
