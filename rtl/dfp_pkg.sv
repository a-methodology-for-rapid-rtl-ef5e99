// Types shared by the derived single-processor operators.
//
// Between operators, data travels as tokens on a valid/ready handshake: a
// token moves when the sender's valid and the receiver's ready are both high
// in the same clock, and a sender keeps a token and its valid stable until it
// moves. A token is an 8-bit value with an end-of-frame flag. The handshake
// and the token layout are this design's choices: the original processors
// exchange data through FIFO-buffered 10-bit ports whose protocol is not
// described.
package dfp_pkg;

  localparam int unsigned DW = 8;   // datapath width after bit-width adjustment

  typedef struct packed {
    logic          eof;   // last token of a frame
    logic [DW-1:0] data;
  } tok_t;

  // function a derived processor is frozen to
  typedef enum logic [1:0] {
    OP_ADD,   // a + b, modulo 2**DW (the 8-bit adder of a 16-bit add whose MSBs are unused)
    OP_ABS,   // |a|, a read as two's complement
    OP_AND,   // a & b
    OP_MAX    // max(a, b), unsigned
  } op_e;

endpackage
