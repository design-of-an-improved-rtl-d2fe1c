// fuzzy_pkg -- types, membership tables and rule base shared by the
// wash-time fuzzy controller.
//
// Grades are 8-bit unsigned integers from 0 to 10 (10 = full membership),
// so the whole datapath works on integers. Each linguistic input (LI) has
// three adjectives and the linguistic output (LO) "wash time" has five.
// The three LIs use identical membership functions, as the original design
// prescribes, so one set of three LI tables serves all of them.
//
// Table contents:
//   LI Small (also Not Greasy, Light): 0->10, 10->8, 20->6, 30->4, 40->2,
//     50..100->0. This table is the specified one.
//   LI Large (also Greasy, Heavy): mirror image of Small (100->10 ... 60->2).
//   LI Medium: peak 10 at 50, falling by 2 per step of 10.
//   LO (counter value 0..12): five triangles with peaks at 0, 3, 6, 9, 12
//     for Very Low .. Very High, grade 10/7/3/0 at distance 0/1/2/3+.
// The Large, Medium and LO shapes are this design's choice.
package fuzzy_pkg;

  localparam int unsigned GW = 8;        // grade width
  localparam int unsigned NRULES = 27;
  localparam int unsigned LI_WORDS = 11; // crisp inputs 0,10,...,100
  localparam int unsigned LI_STEP = 10;
  localparam int unsigned LO_WORDS = 13; // counter values 0..12

  typedef logic [GW-1:0] grade_t;

  // Adjective tables, one per mask ROM flavour.
  typedef enum logic [2:0] {
    LI_LARGE  = 3'd0,  // Large / Greasy / Heavy
    LI_MEDIUM = 3'd1,
    LI_SMALL  = 3'd2,  // Small / Not Greasy / Light
    LO_VLOW   = 3'd3,
    LO_LOW    = 3'd4,
    LO_MED    = 3'd5,
    LO_HIGH   = 3'd6,
    LO_VHIGH  = 3'd7
  } adj_e;

  // LI adjective index: first, second and third adjective of each input
  localparam logic [1:0] A_HI  = 2'd0;  // Large / Greasy / Heavy
  localparam logic [1:0] A_MED = 2'd1;  // Medium
  localparam logic [1:0] A_LO  = 2'd2;  // Small / Not Greasy / Light

  // LO adjective index
  localparam logic [2:0] VLOW = 3'd0, LOW = 3'd1, MED = 3'd2, HIGH = 3'd3, VHIGH = 3'd4;

  typedef struct packed {
    logic [1:0] dirt;   // Dirtiness of the Clothes
    logic [1:0] kind;   // Type of Dirt
    logic [1:0] mass;   // Mass of the Clothes
    logic [2:0] wash;   // Wash Time adjective
  } rule_t;

  // Rule base, rule 1 first.
  localparam rule_t RULES [NRULES] = '{
    '{A_HI,  A_HI,  A_HI,  VHIGH}, //  1
    '{A_HI,  A_HI,  A_MED, HIGH },  //  2
    '{A_HI,  A_MED, A_HI,  HIGH },  //  3
    '{A_HI,  A_HI,  A_LO,  MED  },  //  4
    '{A_HI,  A_LO,  A_HI,  HIGH },  //  5
    '{A_HI,  A_LO,  A_LO,  MED  },  //  6
    '{A_HI,  A_MED, A_MED, MED  },  //  7
    '{A_HI,  A_MED, A_LO,  LOW  },  //  8
    '{A_HI,  A_LO,  A_MED, LOW  },  //  9
    '{A_MED, A_HI,  A_HI,  HIGH },  // 10
    '{A_MED, A_HI,  A_LO,  LOW  },  // 11
    '{A_MED, A_LO,  A_HI,  MED  },  // 12
    '{A_MED, A_LO,  A_LO,  LOW  },  // 13
    '{A_MED, A_LO,  A_MED, LOW  },  // 14
    '{A_MED, A_MED, A_LO,  LOW  },  // 15
    '{A_MED, A_HI,  A_MED, MED  },  // 16
    '{A_MED, A_MED, A_HI,  MED  },  // 17
    '{A_MED, A_MED, A_MED, MED  },  // 18
    '{A_LO,  A_LO,  A_LO,  VLOW },  // 19
    '{A_LO,  A_LO,  A_HI,  MED  },  // 20
    '{A_LO,  A_HI,  A_LO,  LOW  },  // 21
    '{A_LO,  A_LO,  A_MED, LOW  },  // 22
    '{A_LO,  A_MED, A_LO,  LOW  },  // 23
    '{A_LO,  A_MED, A_HI,  MED  },  // 24
    '{A_LO,  A_HI,  A_MED, MED  },  // 25
    '{A_LO,  A_MED, A_MED, LOW  },  // 26
    '{A_LO,  A_HI,  A_HI,  HIGH }   // 27
  };

  // Grade stored in word `word` of the ROM for adjective `adj`.
  // LI words hold crisp values word*10; LO words hold counter value `word`.
  function automatic grade_t rom_word(adj_e adj, int unsigned word);
    int d;
    int g;
    g = 0;
    case (adj)
      LI_SMALL:  g = (word <= 5) ? 10 - 2 * int'(word) : 0;
      LI_LARGE:  g = (word >= 5) ? 2 * int'(word) - 10 : 0;
      LI_MEDIUM: begin
        d = int'(word) - 5;
        if (d < 0) d = -d;
        g = 10 - 2 * d;
      end
      default: begin
        // LO triangle peaks at 0, 3, 6, 9, 12
        d = int'(word) - 3 * (int'(adj) - int'(LO_VLOW));
        if (d < 0) d = -d;
        case (d)
          0:       g = 10;
          1:       g = 7;
          2:       g = 3;
          default: g = 0;
        endcase
      end
    endcase
    return grade_t'(g);
  endfunction

endpackage
