// anoc_pkg: types and constants shared by the asynchronous network fabric and
// the self-timed FIFOs.
//
// Every channel in the design is a bundled-data, four-phase (return-to-zero)
// handshake: the sender puts a word on the data bus, then raises its request
// (called "valid", lv/rv), the receiver raises its acknowledge (la/ra) once it
// has taken the word, the sender drops the request, the receiver drops the
// acknowledge. A data word is 9 bits wide, as in the original design. Its
// most significant bit is the routing bit read by the next switch; after a
// switch the word is rotated left by one bit so that the next routing bit
// moves into the MSB (the rotation direction is this design's choice).
package anoc_pkg;

  parameter int unsigned DATA_W = 9;

  typedef logic [DATA_W-1:0] word_t;

  // Address swizzle of the switch: rotate left by one bit.
  function automatic word_t swizzle(input word_t w);
    return {w[DATA_W-2:0], w[DATA_W-1]};
  endfunction

endpackage
