// daq_pkg: constants, word formats and the chamber layout shared by the
// spark-chamber data-acquisition logic.
//
// Word formats (18 bits, the PDP-9 word):
//   data word     : {1'b0, board_word[6:0], wire[4:0], width[4:0]}
//                   board_word = {board[5:0], odd}; a spark centre lies at
//                   32*board_word + wire - (width-1)/2 wire spacings.
//   plane ID word : {1'b1, 12'b0, plane[4:0]}
// The MSB tag, the 7/5/5 field widths and the place of the board address
// above the wire address follow the system description; the position of the
// plane number inside the ID word and the EVEN/ODD bit as the least
// significant board-word bit are this design's choices.
//
// Chamber layout: 20 planes, two arrays of ten (x, y, x, y, x, y, x, y, u, v),
// 476 readout boards of 64 wires in total. Upstream x/y planes have 18 boards,
// upstream u/v 22, downstream x 36, downstream y 18 and downstream u/v 36
// boards. The plane order and the 22-board upstream u/v planes are derived
// from the chamber sizes and the 476-board total rather than listed anywhere.
package daq_pkg;

  localparam int unsigned WORD_W     = 18;   // PDP-9 word
  localparam int unsigned N_PLANES   = 20;   // wire chamber planes
  localparam int unsigned MAX_BOARDS = 36;   // boards in the largest plane
  localparam int unsigned ADDR_W     = 15;   // PDP-9 memory address (32K)

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [5:0]        board_cnt_t;
  typedef board_cnt_t [N_PLANES-1:0] board_table_t;   // index 0 = plane 1

  // DMA block layout in PDP-9 memory (octal 1000 holds the word count).
  localparam logic [ADDR_W-1:0] DMA_COUNT_ADDR = 15'o1000;
  localparam logic [ADDR_W-1:0] DMA_FIRST_ADDR = 15'o1001;
  localparam logic [ADDR_W-1:0] DMA_LAST_ADDR  = 15'o7777;

  // Boards per plane, plane 1 at index 0.
  localparam board_table_t PLANE_BOARDS = '{
    // downstream array, planes 20 .. 11 (v, u, y, x, y, x, y, x, y, x)
    6'd36, 6'd36, 6'd18, 6'd36, 6'd18, 6'd36, 6'd18, 6'd36, 6'd18, 6'd36,
    // upstream array, planes 10 .. 1 (v, u, y, x, y, x, y, x, y, x)
    6'd22, 6'd22, 6'd18, 6'd18, 6'd18, 6'd18, 6'd18, 6'd18, 6'd18, 6'd18
  };

  function automatic word_t make_data_word(logic [6:0] board_word,
                                           logic [4:0] wire_pos,
                                           logic [4:0] width);
    return {1'b0, board_word, wire_pos, width};
  endfunction

  function automatic word_t make_plane_word(logic [4:0] plane);
    return {1'b1, 12'b0, plane};
  endfunction

endpackage
