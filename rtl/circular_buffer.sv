// circular_buffer: frame-slot address control for the shared SDRAM.
//
// Three agents use frame memory at once: the TV input writes a new frame, the
// motion-detection software works on the previous one in place, and the VGA
// output shows the one before that. The buffer keeps one slot pointer for each
// (32 slots of 128 KB, slot number in address bits 21:17, all other address
// bits zero) and, on every shift, moves the pointers one slot along the ring:
// the VGA takes over the frame the software just finished, the software takes
// the frame the TV just wrote, and the TV moves on to the next slot. After
// reset the VGA, software and TV pointers are slots 0, 1 and 2.
//
// Shift handshake (software enabled, control_device = 1): the software raises
// software_finished; on the next clock edge software_ready rises, the pointers
// move and tv_enable drops for as long as software_ready is high. The software
// lowers software_finished when it sees software_ready, and software_ready
// falls one clock later. With the software disabled (control_device = 0) the
// pointers move once per frame_written pulse from the TV write master, so
// video passes straight from camera to screen.
//
// Background frame: a falling edge of set_background_n while the software is
// enabled stores the software's current slot as the background reference. That
// slot is then taken out of the ring: the TV pointer skips it, so it is never
// overwritten until a new background is set.
//
// Slot size, slot count, reset slots and the registered-request / tv_enable
// behaviour follow the design's synthesized circular buffer. The automatic
// shift with the software off and the way the background slot is kept out of
// the ring are this implementation's own choices.
module circular_buffer
  import ias_pkg::*;
#(
  parameter int unsigned SLOTS     = 2 ** SLOT_W,   // slots in the ring
  parameter int unsigned SHIFT     = SLOT_SHIFT,
  parameter int unsigned AW        = ADDR_W,
  parameter int unsigned VGA_INIT  = 0,
  parameter int unsigned SW_INIT   = 1,
  parameter int unsigned TV_INIT   = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          control_device,      // 1: software motion detection on
  input  logic          software_finished,   // software done with its frame
  input  logic          frame_written,       // pulse: TV master stored a whole frame
  input  logic          set_background_n,    // active-low background request
  output logic [AW-1:0] tv_base_addr,
  output logic          tv_enable,
  output logic [AW-1:0] software_base_addr,
  output logic          software_ready,
  output logic [AW-1:0] vga_base_addr,
  output logic [AW-1:0] background_frame_addr,
  output logic          background_valid,
  output logic          shift                // pulse: the pointers move this cycle
);

  localparam int unsigned SW_BITS = $clog2(SLOTS);
  typedef logic [SW_BITS-1:0] slot_t;

  slot_t vga_slot, sw_slot, tv_slot, bg_slot;
  logic  state_q;      // registered shift request
  logic  bg_btn_q;     // previous level of set_background_n
  logic  req;

  assign req   = control_device ? software_finished : frame_written;
  assign shift = req & ~state_q;

  // Next TV slot: one step along the ring, a second step over the background.
  function automatic slot_t ring_next(slot_t s);
    return (s == slot_t'(SLOTS - 1)) ? slot_t'(0) : s + slot_t'(1);
  endfunction

  slot_t tv_step, tv_next;
  always_comb begin
    tv_step = ring_next(tv_slot);
    tv_next = (background_valid && tv_step == bg_slot) ? ring_next(tv_step) : tv_step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q          <= 1'b0;
      vga_slot         <= slot_t'(VGA_INIT);
      sw_slot          <= slot_t'(SW_INIT);
      tv_slot          <= slot_t'(TV_INIT);
      bg_slot          <= '0;
      background_valid <= 1'b0;
      bg_btn_q         <= 1'b1;
    end else begin
      state_q  <= req;
      bg_btn_q <= set_background_n;
      if (shift) begin
        vga_slot <= sw_slot;
        sw_slot  <= tv_slot;
        tv_slot  <= tv_next;
      end
      if (control_device && bg_btn_q && !set_background_n) begin
        bg_slot          <= sw_slot;
        background_valid <= 1'b1;
      end
    end
  end

  function automatic logic [AW-1:0] slot_base(slot_t s);
    return AW'(s) << SHIFT;
  endfunction

  assign software_ready        = state_q;
  assign tv_enable             = ~state_q;
  assign tv_base_addr          = slot_base(tv_slot);
  assign software_base_addr    = slot_base(sw_slot);
  assign vga_base_addr         = slot_base(vga_slot);
  assign background_frame_addr = slot_base(bg_slot);

endmodule
