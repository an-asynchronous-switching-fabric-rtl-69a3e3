// fabric_pkg: constants shared by the blocks of the asynchronous 4x4 switching fabric.
//
// The fabric has four input and four output ports, each carrying four data bits as
// bundled data (the port count and width are the ones the fabric was designed with).
// Every path through the crossbar carries one "lane" of six signals per port: the
// four data bits, the bundling strobe that qualifies them, and the frame signal,
// which is the sender's path request and stays high while the path is held. The
// split of the six lane signals is this design's choice; the crossbar matrix of six
// signals per port is the fabric's.
package fabric_pkg;

  // Port count and data bits per port.
  localparam int unsigned N_PORTS_DEF = 4;
  localparam int unsigned DATA_W_DEF  = 4;

  // A lane is {frame, strobe, data[DATA_W-1:0]}; these give its width and bit positions.
  function automatic int unsigned lane_w(input int unsigned data_w);
    return data_w + 2;
  endfunction

  function automatic int unsigned strobe_bit(input int unsigned data_w);
    return data_w;
  endfunction

  function automatic int unsigned frame_bit(input int unsigned data_w);
    return data_w + 1;
  endfunction

  // Width of a destination port number (at least one bit).
  function automatic int unsigned dest_w(input int unsigned n_ports);
    return (n_ports > 2) ? $clog2(n_ports) : 1;
  endfunction

endpackage
