// ncl_pkg: shared types and helpers for the NULL Convention Logic (NCL) ALUs.
//
// A dual-rail signal carries one bit on two wires, r0 and r1. DATA0 is r0=1,
// DATA1 is r1=1, NULL is both low, and both high is illegal. A quad-rail signal
// carries two bits X,Y on four one-hot wires: rail k high means {X,Y} = k, all
// low is NULL. The ALU operation codes follow the function table of the design:
// 0 OR, 1 AND, 2 XOR, 3 NOT A, 4 shift right, 5 shift left, 6 subtract, 7 add.
// The helpers below are used by testbenches and by assertions only; the
// circuits themselves are built from threshold gates.
package ncl_pkg;

  typedef struct packed {
    logic r1;
    logic r0;
  } dr_t;

  // Quad-rail signal: bit k of the vector is rail k.
  typedef logic [3:0] qr_t;

  typedef enum logic [2:0] {
    OP_OR  = 3'd0,
    OP_AND = 3'd1,
    OP_XOR = 3'd2,
    OP_NOT = 3'd3,
    OP_SHR = 3'd4,
    OP_SHL = 3'd5,
    OP_SUB = 3'd6,
    OP_ADD = 3'd7
  } alu_op_e;

  localparam int unsigned ALU_WIDTH = 4;
  localparam int unsigned NUM_OPS   = 8;

  // The dual-rail ALU architectures held side by side in ncl_alu_suite.
  typedef enum int unsigned {
    ARCH_NP      = 0,  // non-pipelined
    ARCH_NP_EMB  = 1,  // non-pipelined, embedded registration
    ARCH_PIPE    = 2,  // pipelined
    ARCH_NCR     = 3,  // NULL Cycle Reduction
    ARCH_NCR_EMB = 4   // NULL Cycle Reduction, embedded registration
  } dr_arch_e;

  localparam int unsigned NUM_DR_ARCH = 5;

  // The quad-rail ALU architectures held in ncl_alu_suite.
  typedef enum int unsigned {
    QARCH_NP      = 0,  // non-pipelined
    QARCH_NP_EMB  = 1,  // non-pipelined, embedded registration
    QARCH_NCR     = 2,  // NULL Cycle Reduction
    QARCH_NCR_EMB = 3,  // NULL Cycle Reduction, embedded registration
    QARCH_PIPE    = 4   // pipelined
  } qr_arch_e;

  localparam int unsigned NUM_QR_ARCH = 5;

  localparam dr_t DR_NULL = '{r1: 1'b0, r0: 1'b0};

  function automatic dr_t dr_enc(input logic b);
    return b ? dr_t'{r1: 1'b1, r0: 1'b0} : dr_t'{r1: 1'b0, r0: 1'b1};
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.r0 ^ d.r1;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return !(d.r0 || d.r1);
  endfunction

  function automatic qr_t qr_enc(input logic [1:0] v);
    return qr_t'(4'b0001 << v);
  endfunction

  function automatic logic qr_is_data(input qr_t q);
    return $onehot(q);
  endfunction

  function automatic logic [1:0] qr_val(input qr_t q);
    return {q[3] | q[2], q[3] | q[1]};
  endfunction

  // Reference model of the function table: {Cout/Bout, F}.
  function automatic logic [4:0] alu_ref(input logic [2:0] op, input logic [3:0] a,
                                         input logic [3:0] b, input logic cin);
    logic [4:0] r;
    unique case (op)
      3'd0:    r = {1'b0, a | b};
      3'd1:    r = {1'b0, a & b};
      3'd2:    r = {1'b0, a ^ b};
      3'd3:    r = {1'b0, ~a};
      3'd4:    r = {a[0], cin, a[3:1]};
      3'd5:    r = {a[3], a[2:0], cin};
      3'd6:    r = {1'b0, a} + {1'b0, ~b} + {4'b0, cin};
      default: r = {1'b0, a} + {1'b0, b} + {4'b0, cin};
    endcase
    return r;
  endfunction

endpackage
