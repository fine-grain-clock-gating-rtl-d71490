// lacg_pkg: constants shared by the look-ahead clock gated (LACG) adder and
// multiplier. The adder is cut into 8-bit carry-ripple slices, one slice per
// pipeline stage, so an adder of WIDTH bits has WIDTH/SLICE_W stages and
// WIDTH/SLICE_W - 1 register banks between them (the last slice drives the
// sum combinationally). The slice width and the 32-bit operand width follow
// the source design; the latency functions are derived from that structure.
package lacg_pkg;

  localparam int unsigned SLICE_W  = 8;   // bits per carry-ripple slice
  localparam int unsigned OPER_W   = 32;  // operand width of adder and multiplier

  // Register banks (= clock cycles of latency) in a WIDTH-bit pipelined adder.
  function automatic int unsigned adder_latency(int unsigned width);
    return width / SLICE_W - 1;
  endfunction

  // Latency of the WIDTH x WIDTH array multiplier: WIDTH-1 cascaded adders.
  function automatic int unsigned mult_latency(int unsigned width);
    return (width - 1) * adder_latency(width);
  endfunction

endpackage
