// som_pkg: types and helpers shared by the SOM accelerator.
//
// All data in the accelerator is IEEE-754 binary32 (the kernels work on
// float buffers). The global-memory port is a word-addressed request /
// response pair: a request is accepted in the cycle where req and gnt are
// both high; read data returns later, in request order, with rvalid. One
// address holds one float. These port structs are this design's own choice;
// the OpenCL tool generated the real memory interconnect.
package som_pkg;

  typedef logic [31:0] f32_t;

  localparam int unsigned GADDR_W = 32;
  typedef logic [GADDR_W-1:0] gaddr_t;

  // Request from a kernel (master) towards global memory.
  typedef struct packed {
    logic   req;    // request valid
    logic   we;     // 1: write, 0: read
    gaddr_t addr;   // word address
    f32_t   wdata;  // write data
  } gmem_req_t;

  // Answer from global memory.
  typedef struct packed {
    logic gnt;      // request accepted this cycle
    logic rvalid;   // read data valid
    f32_t rdata;    // read data
  } gmem_rsp_t;

  localparam f32_t F32_ZERO = 32'h0000_0000;

  // |a|: clear the sign bit.
  function automatic f32_t f32_abs(f32_t a);
    return {1'b0, a[30:0]};
  endfunction

  // a < b for ordinary (non-NaN) floats; +0 and -0 compare equal.
  function automatic logic f32_lt(f32_t a, f32_t b);
    logic a_zero, b_zero;
    a_zero = (a[30:0] == '0);
    b_zero = (b[30:0] == '0);
    if (a_zero && b_zero) return 1'b0;
    if (a[31] != b[31]) return a[31];             // negative < positive
    if (!a[31]) return a[30:0] < b[30:0];         // both positive
    return a[30:0] > b[30:0];                     // both negative
  endfunction

endpackage
